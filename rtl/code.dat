// MULx3: multiply the constant 10 by 3 with repeated addition; the product (0x1E)
// is left in word 0x0D and the program then loops on itself at 0x0C.
0000 // 00  MOVE  0x00
500D // 01  STORE 0x0D   product = 0
0003 // 02  MOVE  0x03
500E // 03  STORE 0x0E   count = 3
900C // 04  JUMPZ 0x0C   loop: if count == 0 stop
2001 // 05  SUB   0x01
500E // 06  STORE 0x0E   count = count - 1
400D // 07  LOAD  0x0D
100A // 08  ADD   0x0A
500D // 09  STORE 0x0D   product = product + 10
400E // 0A  LOAD  0x0E
8004 // 0B  JUMPU 0x04
800C // 0C  JUMPU 0x0C   halt
0000 // 0D  product
0000 // 0E  count
