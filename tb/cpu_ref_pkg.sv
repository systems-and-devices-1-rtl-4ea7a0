// cpu_ref_pkg: an instruction-level reference model of the SimpleCPU for the
// processor testbenches. It executes one whole instruction per call on its own copy
// of the memory and reports what the hardware must do: the next PC and ACC and, for a
// STORE, the word written and where.
package cpu_ref_pkg;
  import simple_cpu_pkg::*;

  typedef struct {
    logic [7:0]  pc;
    logic [7:0]  acc;
    logic [15:0] mem [256];
  } cpu_state_t;

  typedef struct {
    logic [3:0]  opcode;
    logic        jumped;     // a conditional or unconditional jump was taken
    logic        wrapped;    // ADD/ADDM carried out of bit 7 or SUB/SUBM borrowed
    logic        high_byte;  // a data read saw a non-zero high byte, which is ignored
    logic        stored;
    logic [7:0]  st_addr;
    logic [15:0] st_data;
  } step_info_t;

  function automatic step_info_t step(ref cpu_state_t s);
    step_info_t  r;
    logic [15:0] ins;
    logic [7:0]  opnd, md;
    logic [8:0]  wide;
    ins  = s.mem[s.pc];
    opnd = ins[7:0];
    md   = s.mem[opnd][7:0];
    r = '{opcode: ins[15:12], jumped: 1'b0, wrapped: 1'b0, high_byte: 1'b0,
          stored: 1'b0, st_addr: 8'h00, st_data: 16'h0000};
    if (ins[15:12] inside {4'd4, 4'd6, 4'd7}) r.high_byte = (s.mem[opnd][15:8] != 8'h00);
    case (ins[15:12])
      4'd0: s.acc = opnd;
      4'd1: begin wide = {1'b0, s.acc} + {1'b0, opnd}; r.wrapped = wide[8]; s.acc = wide[7:0]; end
      4'd2: begin r.wrapped = (opnd > s.acc); s.acc = s.acc - opnd; end
      4'd3: s.acc = s.acc & opnd;
      4'd4: s.acc = md;
      4'd5: begin
        r.stored = 1'b1; r.st_addr = opnd; r.st_data = {8'h00, s.acc};
        s.mem[opnd] = {8'h00, s.acc};
      end
      4'd6: begin wide = {1'b0, s.acc} + {1'b0, md}; r.wrapped = wide[8]; s.acc = wide[7:0]; end
      4'd7: begin r.wrapped = (md > s.acc); s.acc = s.acc - md; end
      4'd8: r.jumped = 1'b1;
      4'd9: r.jumped = (s.acc == 8'h00);
      4'd10: r.jumped = (s.acc != 8'h00);
      default: ;
    endcase
    s.pc = r.jumped ? opnd : s.pc + 8'd1;
    return r;
  endfunction
endpackage
