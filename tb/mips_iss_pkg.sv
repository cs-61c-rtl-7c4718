// mips_iss_pkg: reference model and assembler for the MIPS-lite testbenches.
//
// mips_iss is an instruction-set model written directly from the register
// transfers of the six instructions (addu, subu, ori, lw, sw, beq), with
// register 0 reading as zero. step() executes one instruction and reports the
// register write, the memory write and the next PC, which testbenches compare
// with the hardware cycle by cycle. Opcodes other than the six change nothing
// but the PC. Memory words that were never stored read as zero and are
// flagged, so a test can avoid depending on them.
package mips_iss_pkg;

  typedef struct {
    bit          wb_we;
    bit [4:0]    wb_addr;
    bit [31:0]   wb_data;
    bit          mw_we;
    bit [31:0]   mw_addr;
    bit [31:0]   mw_data;
    bit [31:0]   next_pc;
    bit          branch_taken;
    bit          mem_unknown;
  } effect_t;

  function automatic bit [31:0] asm_r(bit [5:0] funct, bit [4:0] rd, bit [4:0] rs, bit [4:0] rt);
    return {6'b000000, rs, rt, rd, 5'd0, funct};
  endfunction

  function automatic bit [31:0] asm_i(bit [5:0] op, bit [4:0] rt, bit [4:0] rs, bit [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic bit [31:0] addu(int rd, int rs, int rt); return asm_r(6'h20, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic bit [31:0] subu(int rd, int rs, int rt); return asm_r(6'h22, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic bit [31:0] ori (int rt, int rs, int imm); return asm_i(6'h0d, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic bit [31:0] lw  (int rt, int imm, int rs); return asm_i(6'h23, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic bit [31:0] sw  (int rt, int imm, int rs); return asm_i(6'h2b, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic bit [31:0] beq (int rs, int rt, int off); return asm_i(6'h04, 5'(rt), 5'(rs), 16'(off)); endfunction
  function automatic bit [31:0] jmp (int target);              return {6'h02, 26'(target)}; endfunction


  // Hand-written program: the array-swap example, zero- and sign-extended
  // immediates, a write to register 0, and a countdown loop whose beq is
  // taken both forwards and backwards. It stores sum(1..LOOP_N) = 15 at
  // address 0 and ends in a one-instruction halt loop.
  localparam int LOOP_N       = 5;
  localparam int DIRECTED_PRE = 19;  // instructions before the loop body
  // Cycles from reset to the first fetch of the halt instruction at one
  // instruction per cycle: prologue, LOOP_N-1 passes of 4 instructions, a
  // last pass of 3, then the store and the jump-opcode word.
  localparam int DIRECTED_CYCLES = DIRECTED_PRE + 4 * (LOOP_N - 1) + 3 + 2;

  function automatic void directed_program(ref bit [31:0] prog[$], output int halt_idx);
    prog.delete();
    prog.push_back(ori(1, 0, 16'h0040));    // $1 = 64, base for negative offsets
    prog.push_back(ori(2, 0, 16'h0010));    // $2 = &v[k]
    prog.push_back(ori(5, 0, 16'h1234));
    prog.push_back(ori(6, 0, 16'hBEEF));    // zero-extended: 0x0000BEEF
    prog.push_back(sw(5, 0, 2));
    prog.push_back(sw(6, 4, 2));
    prog.push_back(lw(8, 0, 2));            // swap v[k], v[k+1]
    prog.push_back(lw(9, 4, 2));
    prog.push_back(sw(9, 0, 2));
    prog.push_back(sw(8, 4, 2));
    prog.push_back(lw(10, 0, 2));
    prog.push_back(lw(11, 4, 2));
    prog.push_back(sw(11, -4, 1));          // sign-extended offset: address 60
    prog.push_back(lw(12, -4, 1));
    prog.push_back(addu(0, 5, 6));          // discarded: register 0 stays 0
    prog.push_back(subu(13, 0, 5));         // 0 - 0x1234
    prog.push_back(ori(3, 0, LOOP_N));
    prog.push_back(ori(4, 0, 1));
    prog.push_back(ori(7, 0, 0));
    // loop:
    prog.push_back(addu(7, 7, 3));
    prog.push_back(subu(3, 3, 4));
    prog.push_back(beq(3, 0, 1));           // to done
    prog.push_back(beq(0, 0, -4));          // to loop
    // done:
    prog.push_back(sw(7, 0, 0));
    prog.push_back(jmp(0));                 // jump opcode: no jump path, runs as a no-op
    halt_idx = prog.size();
    prog.push_back(beq(0, 0, -1));          // halt
  endfunction

  // Random program: a prologue clears data words 0..15 and sets $1 = 64;
  // then n random instructions whose loads and stores stay in those 16
  // words (base $0 with offsets 0..60, or base $1 with offsets -64..-4) and
  // whose branches only go forward, never past the halt loop at the end.
  // $1 is never overwritten.
  function automatic void random_program(ref bit [31:0] prog[$], input int n, output int halt_idx);
    prog.delete();
    for (int k = 0; k < 16; k++) prog.push_back(sw(0, 4 * k, 0));
    prog.push_back(ori(1, 0, 64));
    for (int i = 0; i < n; i++) begin
      int kind = $urandom % 100;
      int rd   = ($urandom % 16 == 0) ? 0 : 2 + $urandom % 30;
      int rs   = $urandom % 32;
      int rt   = $urandom % 32;
      int left = n - i - 1;
      if      (kind < 16) prog.push_back(addu(rd, rs, rt));
      else if (kind < 32) prog.push_back(subu(rd, rs, rt));
      else if (kind < 48) prog.push_back(ori(rd, rs, $urandom % 65536));
      else if (kind < 62) begin
        if ($urandom % 2) prog.push_back(lw(rd, 4 * ($urandom % 16), 0));
        else              prog.push_back(lw(rd, -4 * (1 + $urandom % 16), 1));
      end else if (kind < 76) begin
        if ($urandom % 2) prog.push_back(sw(rt, 4 * ($urandom % 16), 0));
        else              prog.push_back(sw(rt, -4 * (1 + $urandom % 16), 1));
      end else if (kind < 96) begin
        int off = $urandom % 4;
        if (off > left) off = left;
        if ($urandom % 3 == 0) rt = rs;
        prog.push_back(beq(rs, rt, off));
      end else if (kind < 98) prog.push_back(jmp($urandom));
      else prog.push_back(asm_r(6'($urandom), 5'(rd), 5'(rs), 5'(rt)));  // other funct: no-op
    end
    halt_idx = prog.size();
    prog.push_back(beq(0, 0, -1));
  endfunction

  class mips_iss;
    bit [31:0] regs [32];
    bit [31:0] mem  [bit [31:0]];
    bit [31:0] pc;

    function new(bit [31:0] reset_pc = 0);
      reset(reset_pc);
    endfunction

    function void reset(bit [31:0] reset_pc = 0);
      foreach (regs[i]) regs[i] = 0;
      mem.delete();
      pc = reset_pc;
    endfunction

    function bit [31:0] rd_reg(bit [4:0] r);
      return (r == 0) ? 32'd0 : regs[r];
    endfunction

    // Execute one instruction: compute its effects, then apply them.
    function effect_t step(bit [31:0] ins);
      effect_t   e;
      bit [5:0]  op    = ins[31:26];
      bit [4:0]  rs    = ins[25:21];
      bit [4:0]  rt    = ins[20:16];
      bit [4:0]  rd    = ins[15:11];
      bit [5:0]  fn    = ins[5:0];
      bit [31:0] sext  = {{16{ins[15]}}, ins[15:0]};
      bit [31:0] zext  = {16'd0, ins[15:0]};
      bit [31:0] ea    = rd_reg(rs) + sext;
      e = '{default: 0};
      e.next_pc = pc + 4;
      case (op)
        6'h00: begin
          if (fn == 6'h20) begin e.wb_we = 1; e.wb_addr = rd; e.wb_data = rd_reg(rs) + rd_reg(rt); end
          if (fn == 6'h22) begin e.wb_we = 1; e.wb_addr = rd; e.wb_data = rd_reg(rs) - rd_reg(rt); end
        end
        6'h0d: begin e.wb_we = 1; e.wb_addr = rt; e.wb_data = rd_reg(rs) | zext; end
        6'h23: begin
          e.wb_we = 1; e.wb_addr = rt;
          if (mem.exists({ea[31:2], 2'b00})) e.wb_data = mem[{ea[31:2], 2'b00}];
          else begin e.wb_data = 0; e.mem_unknown = 1; end
        end
        6'h2b: begin e.mw_we = 1; e.mw_addr = ea; e.mw_data = rd_reg(rt); end
        6'h04: if (rd_reg(rs) == rd_reg(rt)) begin
          e.branch_taken = 1;
          e.next_pc = pc + 4 + {sext[29:0], 2'b00};
        end
        default: ;
      endcase
      if (e.wb_we && e.wb_addr != 0) regs[e.wb_addr] = e.wb_data;
      if (e.mw_we) mem[{e.mw_addr[31:2], 2'b00}] = e.mw_data;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

endpackage
