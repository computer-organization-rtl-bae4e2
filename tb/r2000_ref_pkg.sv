// r2000_ref_pkg: instruction-level reference model of the R2000 subset, used
// by the processor testbenches. run() executes a memory image until HALT (or
// a step limit), updating the image, and returns the number of clock cycles
// the multi-cycle implementation needs to reach the HALT execute state:
// 2 (fetch, decode) per instruction plus 1 for add/sub/and/or/addi/j and a
// not-taken beq, 2 for slt, sw and a taken beq, 3 for lw. It also counts how
// often each mechanism occurred so a testbench can check coverage. Program
// builders for the Fibonacci example and a second program that uses every
// instruction are included.
package r2000_ref_pkg;
  import r2000_pkg::*;

  typedef logic [31:0] mem_t [256];

  typedef struct {
    int unsigned cycles;
    int unsigned instrs;
    int unsigned n_rtype, n_slt_lt, n_slt_ge, n_lw, n_sw, n_beq_taken,
                 n_beq_not, n_addi, n_j, n_halt;
    bit          halted;
  } stats_t;

  function automatic void run(ref mem_t m, output stats_t st, input int unsigned max_steps = 100000);
    logic [31:0] r [32];
    logic [31:0] pc, inst, a, b, imm, diff;
    st = '{default: 0};
    foreach (r[i]) r[i] = 32'd0;
    pc = 32'd0;
    for (int unsigned step = 0; step < max_steps; step++) begin
      inst = m[pc[7:0]];
      pc   = pc + 32'd1;
      a    = (inst[25:21] == 5'd31) ? 32'd0 : r[inst[25:21]];
      b    = (inst[20:16] == 5'd31) ? 32'd0 : r[inst[20:16]];
      imm  = {{16{inst[15]}}, inst[15:0]};
      st.cycles += 2;
      case (inst[31:26])
        6'h00: begin
          st.cycles += 1;
          case (inst[5:0])
            6'h20: begin r[inst[15:11]] = a + b; st.n_rtype++; end
            6'h22: begin r[inst[15:11]] = a - b; st.n_rtype++; end
            6'h24: begin r[inst[15:11]] = a & b; st.n_rtype++; end
            6'h25: begin r[inst[15:11]] = a | b; st.n_rtype++; end
            6'h2a: begin
              diff = a - b;
              r[inst[15:11]] = {31'd0, diff[31]};
              st.cycles += 1;
              if (diff[31]) st.n_slt_lt++; else st.n_slt_ge++;
            end
            default: ;
          endcase
        end
        6'h23: begin r[inst[20:16]] = m[8'(a + imm)]; st.cycles += 3; st.n_lw++; end
        6'h2b: begin m[8'(a + imm)] = b; st.cycles += 2; st.n_sw++; end
        6'h04: begin
          if (a == b) begin pc = pc + imm; st.cycles += 2; st.n_beq_taken++; end
          else begin st.cycles += 1; st.n_beq_not++; end
        end
        6'h08: begin r[inst[20:16]] = a + imm; st.cycles += 1; st.n_addi++; end
        6'h02: begin pc = {6'd0, inst[25:0]}; st.cycles += 1; st.n_j++; end
        6'h3f: begin st.halted = 1'b1; st.n_halt++; return; end
        default: st.cycles += 1;
      endcase
      r[31] = 32'd0;
      st.instrs++;
    end
  endfunction

  // Fibonacci loop: reads N from word 254, leaves the result in word 255.
  function automatic void fib_program(ref mem_t m, input logic [31:0] n);
    localparam logic [4:0] R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R3 = 5'd3, RZ = 5'd31;
    foreach (m[i]) m[i] = 32'd0;
    m[8'h00] = enc_i(OP_ADDI, RZ, R1, 16'h0000);   // r1 = 0
    m[8'h01] = enc_i(OP_ADDI, RZ, R2, 16'h0001);   // r2 = 1
    m[8'h02] = enc_i(OP_LW,   RZ, R0, 16'h00fe);   // r0 = mem[254]
    m[8'h03] = enc_r(RZ, R0, R3, FN_SLT);          // r3 = (0 < r0)
    m[8'h04] = enc_i(OP_BEQ,  R3, RZ, 16'h0009);   // if r3 == 0 goto exit2
    m[8'h05] = enc_i(OP_BEQ,  RZ, RZ, 16'h0002);   // goto entry
    m[8'h06] = enc_r(R1, R2, R1, FN_ADD);          // loop: r1 = r1 + r2
    m[8'h07] = enc_i(OP_ADDI, R0, R0, 16'hffff);   // r0 = r0 - 1
    m[8'h08] = enc_i(OP_BEQ,  R0, RZ, 16'h0004);   // entry: if r0 == 0 goto exit1
    m[8'h09] = enc_r(R2, R1, R2, FN_ADD);          // r2 = r2 + r1
    m[8'h0a] = enc_i(OP_ADDI, R0, R0, 16'hffff);   // r0 = r0 - 1
    m[8'h0b] = enc_i(OP_BEQ,  R0, RZ, 16'h0002);   // if r0 == 0 goto exit2
    m[8'h0c] = enc_j(OP_J, 26'h0000006);           // goto loop
    m[8'h0d] = enc_r(R1, RZ, R2, FN_OR);           // exit1: r2 = r1
    m[8'h0e] = enc_i(OP_SW,   RZ, R2, 16'h00ff);   // exit2: mem[255] = r2
    m[8'h0f] = enc_j(OP_HALT, 26'd0);
    m[8'hfe] = n;
  endfunction

  // Exercise program: every instruction, both slt outcomes, negative
  // offsets, and writes aimed at the zero register. Reads x, y from words
  // 0xf0/0xf1 and stores results to 0xf2..0xf9.
  function automatic void mix_program(ref mem_t m, input logic [31:0] x, input logic [31:0] y);
    localparam logic [4:0] RZ = 5'd31;
    foreach (m[i]) m[i] = 32'd0;
    m[8'h00] = enc_i(OP_LW,   RZ, 5'd4, 16'h00f0);  // r4 = x
    m[8'h01] = enc_i(OP_ADDI, RZ, 5'd9, 16'h00f1);  // r9 = 0xf1
    m[8'h02] = enc_i(OP_LW,   5'd9, 5'd5, 16'h0000);// r5 = y
    m[8'h03] = enc_r(5'd4, 5'd5, 5'd6, FN_SUB);     // r6 = x - y
    m[8'h04] = enc_r(5'd4, 5'd5, 5'd7, FN_AND);     // r7 = x & y
    m[8'h05] = enc_r(5'd4, 5'd5, 5'd8, FN_OR);      // r8 = x | y
    m[8'h06] = enc_r(5'd4, 5'd5, 5'd10, FN_SLT);    // r10 = x < y
    m[8'h07] = enc_r(5'd5, 5'd4, 5'd11, FN_SLT);    // r11 = y < x
    m[8'h08] = enc_r(5'd4, 5'd5, RZ, FN_ADD);       // write to rz is ignored
    m[8'h09] = enc_i(OP_SW,   5'd9, 5'd6, 16'h0001);// mem[0xf2] = r6
    m[8'h0a] = enc_i(OP_SW,   5'd9, 5'd7, 16'h0002);// mem[0xf3] = r7
    m[8'h0b] = enc_i(OP_SW,   5'd9, 5'd8, 16'h0003);// mem[0xf4] = r8
    m[8'h0c] = enc_i(OP_SW,   5'd9, 5'd10, 16'h0004);// mem[0xf5] = r10
    m[8'h0d] = enc_i(OP_SW,   5'd9, 5'd11, 16'h0005);// mem[0xf6] = r11
    m[8'h0e] = enc_i(OP_ADDI, 5'd4, 5'd12, 16'h8001);// r12 = x - 32767
    m[8'h0f] = enc_i(OP_SW,   5'd9, 5'd12, 16'h0006);// mem[0xf7] = r12
    m[8'h10] = enc_i(OP_BEQ,  5'd4, 5'd5, 16'h0001); // if x == y skip next
    m[8'h11] = enc_i(OP_SW,   5'd9, RZ, 16'h0007);   // mem[0xf8] = rz (0)
    m[8'h12] = enc_j(OP_J, 26'h0000015);             // goto 0x15
    m[8'h13] = enc_j(OP_HALT, 26'd0);                // skipped
    m[8'h14] = enc_i(OP_BEQ,  RZ, RZ, 16'hfffe);     // back to 0x13 (halt)
    m[8'h15] = enc_i(OP_SW,   5'd9, 5'd4, 16'h0008); // mem[0xf9] = x
    m[8'h16] = enc_i(OP_BEQ,  RZ, RZ, 16'hfffd);     // goto 0x14
    m[8'hf0] = x;
    m[8'hf1] = y;
    m[8'hf8] = 32'h1234_5678;
  endfunction

  function automatic logic [31:0] fib(logic [31:0] n);
    logic [31:0] x0 = 0, x1 = 1, t;
    if (n == 0 || n[31]) return 32'd1;
    for (int unsigned i = 1; i < n; i++) begin t = x0 + x1; x0 = x1; x1 = t; end
    return x1;
  endfunction
endpackage
