// ctl_model_pkg: reference for the control lines, used by the control testbenches.
//
// It is written from the meaning of each instruction (what it reads, writes and jumps
// on) rather than from the control equations, so the testbenches compare two
// independent descriptions of the same behaviour.
package ctl_model_pkg;
  import simple_cpu_pkg::*;

  function automatic ctl_t expected_ctl(logic [3:0] opcode, int phase_idx, logic z);
    ctl_t c;
    logic is_mem, writes_acc, jumps;
    logic [2:0] f;
    c = '0;
    is_mem = 1'b0; writes_acc = 1'b0; jumps = 1'b0; f = 3'b000;
    case (opcode)
      4'd0:  begin writes_acc = 1'b1; f = 3'b100; end           // MOVE
      4'd1:  begin writes_acc = 1'b1; f = 3'b000; end           // ADD
      4'd2:  begin writes_acc = 1'b1; f = 3'b001; end           // SUB
      4'd3:  begin writes_acc = 1'b1; f = 3'b010; end           // AND
      4'd4:  begin writes_acc = 1'b1; f = 3'b100; is_mem = 1'b1; c.data_sel = 1'b1; end
      4'd5:  begin is_mem = 1'b1; end                           // STORE
      4'd6:  begin writes_acc = 1'b1; f = 3'b000; is_mem = 1'b1; c.data_sel = 1'b1; end
      4'd7:  begin writes_acc = 1'b1; f = 3'b001; is_mem = 1'b1; c.data_sel = 1'b1; end
      4'd8:  jumps = 1'b1;                                      // JUMPU
      4'd9:  jumps = z;                                         // JUMPZ
      4'd10: jumps = !z;                                        // JUMPNZ
      default: ;
    endcase
    c.acc_ctl = f;
    case (phase_idx)
      0: begin                      // FETCH
        c.rom_en = 1'b1;
        c.ir_en  = 1'b1;
      end
      1: begin                      // DECODE
        c.ram_en   = is_mem;
        c.addr_sel = is_mem;
        c.pc_en    = !jumps;
      end
      default: begin                // EXECUTE
        c.ram_en   = is_mem;
        c.addr_sel = is_mem;
        c.ram_wr   = (opcode == 4'd5);
        c.acc_en   = writes_acc;
        c.pc_en    = jumps;
        c.pc_ld    = jumps;
      end
    endcase
    return c;
  endfunction
endpackage
