// r2000_regfile: 32 x 32-bit register file of the R2000 datapath.
// Register indices come straight from the instruction register: rs =
// Inst[25:21], rt = Inst[20:16], rd = Inst[15:11]. On every rising edge the
// outputs RegA and RegB capture regfile[rs] and regfile[rt] (so they are
// valid one cycle after IR changes: the decode cycle). When reg_write is high
// the same edge writes ALUout (wr_data_sel=0) or MBR (wr_data_sel=1) into
// rt (wr_reg_sel=0) or rd (wr_reg_sel=1); RegA/RegB get the value from before
// the write. Register 31 is the constant-zero register: it reads 0 and writes
// to it are ignored, as in the reference design. Registers 0..30 have no reset.
module r2000_regfile
  import r2000_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic        clk,
  input  logic [31:0] mbr,
  input  logic [31:0] alu_out,
  input  logic [31:0] inst,
  input  logic        reg_write,
  input  logic        wr_data_sel,
  input  logic        wr_reg_sel,
  output logic [31:0] reg_a,
  output logic [31:0] reg_b
);

  logic [31:0] regs [NREGS];
  logic [4:0]  rs, rt, rd, wr_reg;
  logic [31:0] wr_data;

  assign rs      = inst[25:21];
  assign rt      = inst[20:16];
  assign rd      = inst[15:11];
  assign wr_reg  = (wr_reg_sel == WRREG_RD) ? rd : rt;
  assign wr_data = (wr_data_sel == WRDATA_MBR) ? mbr : alu_out;

  function automatic logic [31:0] rd_port(logic [4:0] idx);
    return (idx == ZERO_REG || 32'(idx) >= NREGS) ? 32'd0 : regs[idx];
  endfunction

  always_ff @(posedge clk) begin
    reg_a <= rd_port(rs);
    reg_b <= rd_port(rt);
    if (reg_write && wr_reg != ZERO_REG && 32'(wr_reg) < NREGS) begin
      regs[wr_reg] <= wr_data;
    end
  end

endmodule
