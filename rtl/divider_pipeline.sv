// divider_pipeline: fully pipelined adjustable-precision divider.
//
// The same division as divider_iterative, unrolled: Q_I+Q_F sub_divider stages
// in a chain, each followed by registers for the partial dividend, the shifted
// divisor and the partial quotient. The first stage receives the initialized
// operands (zeros appended, see divider_pkg) and an all-zero quotient. A new
// pair of operands can enter every clock, and each quotient appears
// Q_I+Q_F clocks after its operands.
//
// Interface: in_valid/dividend/divisor/in_tag enter together; out_valid,
// quotient, remainder and out_tag leave together Q_I+Q_F clocks later. in_tag
// is TAG_W bits of caller data carried alongside the operands; the valid bit
// and the tag are additions of this design (the stage chain itself has only
// operands, clock and reset). Reset clears all stage registers.
//
// Defaults: 32-bit integer operands with a 32.7 quotient, as divider_iterative.
module divider_pipeline
  import divider_pkg::*;
#(
  parameter int unsigned DVD_I = 32,
  parameter int unsigned DVD_F = 0,
  parameter int unsigned DVS_I = 32,
  parameter int unsigned DVS_F = 0,
  parameter int unsigned Q_I   = 32,
  parameter int unsigned Q_F   = 7,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned DVD_W = DVD_I + DVD_F,
  localparam int unsigned DVS_W = DVS_I + DVS_F,
  localparam int unsigned Q_W   = Q_I + Q_F,
  localparam int unsigned A_W   = dividend_init_w(DVD_I, DVD_F, DVS_F, Q_F),
  localparam int unsigned B_W   = divisor_init_w(DVS_I, DVS_F, Q_I, Q_F)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DVD_W-1:0] dividend,
  input  logic [DVS_W-1:0] divisor,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q_W-1:0]   quotient,
  output logic [A_W-1:0]   remainder,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned SA = dividend_shift(DVD_F, DVS_F, Q_F);

  initial assert (DVS_F + Q_F >= DVD_F && Q_W >= 2)
    else $error("divider_pipeline: need DVS_F+Q_F >= DVD_F and Q_I+Q_F >= 2");

  // Index 0 is the initialized input; index k is the register after stage k.
  logic [A_W-1:0]   dvd [Q_W+1];
  logic [B_W-1:0]   dvs [Q_W+1];
  logic [Q_W-1:0]   res [Q_W+1];
  logic             vld [Q_W+1];
  logic [TAG_W-1:0] tag [Q_W+1];

  assign dvd[0] = {dividend, SA'(0)};
  assign dvs[0] = {divisor, Q_W'(0)};
  assign res[0] = '0;
  assign vld[0] = in_valid;
  assign tag[0] = in_tag;

  for (genvar k = 0; k < Q_W; k++) begin : g_stage
    logic [A_W-1:0] dvd_nx;
    logic [B_W-1:0] dvs_nx;
    logic [Q_W-1:0] res_nx;

    sub_divider #(.A_W(A_W), .B_W(B_W), .Q_W(Q_W)) u_sub (
      .dividend_in (dvd[k]),
      .divisor_in  (dvs[k]),
      .result_in   (res[k]),
      .dividend_out(dvd_nx),
      .divisor_out (dvs_nx),
      .result_out  (res_nx)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dvd[k+1] <= '0;
        dvs[k+1] <= '0;
        res[k+1] <= '0;
        vld[k+1] <= 1'b0;
        tag[k+1] <= '0;
      end else begin
        dvd[k+1] <= dvd_nx;
        dvs[k+1] <= dvs_nx;
        res[k+1] <= res_nx;
        vld[k+1] <= vld[k];
        tag[k+1] <= tag[k];
      end
    end
  end

  assign out_valid = vld[Q_W];
  assign quotient  = res[Q_W];
  assign remainder = dvd[Q_W];
  assign out_tag   = tag[Q_W];

endmodule
