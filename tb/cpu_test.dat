// Instruction test for the SimpleCPU: every opcode, both outcomes of each conditional
// jump, 8-bit wrap-around in ADD and SUB, the unused high byte of a data word, and a
// store that rewrites an instruction which is executed afterwards.
@00
00F0 // 00  MOVE   0xF0
1020 // 01  ADD    0x20    0x110 wraps to 0x10
2011 // 02  SUB    0x11    borrows to 0xFF
303C // 03  AND    0x3C    0x3C
5030 // 04  STORE  0x30    M[30] = 0x003C
0005 // 05  MOVE   0x05
6030 // 06  ADDM   0x30    0x41
7031 // 07  SUBM   0x31    0x40
5010 // 08  STORE  0x10    word 0x10 becomes 0x0040 = MOVE 0x40
0000 // 09  MOVE   0x00    Z = 1
A020 // 0A  JUMPNZ 0x20    not taken
900D // 0B  JUMPZ  0x0D    taken
00EE // 0C  MOVE   0xEE    skipped
4031 // 0D  LOAD   0x31    ACC = 1
9020 // 0E  JUMPZ  0x20    not taken
A010 // 0F  JUMPNZ 0x10    taken
0000 // 10  overwritten by the STORE at 08; runs as MOVE 0x40
2040 // 11  SUB    0x40    ACC = 0
4032 // 12  LOAD   0x32    low byte 0x55 only
8013 // 13  JUMPU  0x13    stop here
@20
80EE // 20  JUMPU  0xEE    reached only on a wrong jump
@30
0000 // 30  variable
0001 // 31  constant 1
AB55 // 32  data word with a non-zero high byte
