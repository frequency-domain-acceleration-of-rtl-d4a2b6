// spn: three-stage streaming permutation network (SPN).
//
// A folded Clos network that permutes a stream of S1-word beats in space and
// in time:
//   stage 0  an S1-to-S1 connection: memory bank b takes input lane wr_sel[b]
//   stage 1  S1 memory banks, each written at wr_addr[b] and read at
//            rd_addr[b]; each bank holds DEPTH words
//   stage 2  an S1-to-S1 connection: output lane l takes bank out_sel[l]
// Any permutation of a block of S1*S2 words can be streamed through it when
// the control (computed offline or by a controller such as spn_transpose)
// sends every word of an input beat to a different bank and reads every
// output beat from different banks. The network and its three stages follow
// the accelerator's permutation unit; the control interface is this design's.
//
// Timing: a write happens in the cycle in_valid is high. A read issued with
// rd_en returns out_data one cycle later with out_valid; out_sel is given
// with the read and delayed internally to line up with the data. Each bank
// has one write and one read port, so a controller can fill one half of a
// bank (S2 words) while draining the other, which is how a stream runs
// without gaps; DEPTH = 2*S2 for that use.
module spn
  import oaa_pkg::*;
#(
  parameter int unsigned S1    = 16,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned LW   = $clog2(S1),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         in_data [S1],
  input  logic [LW-1:0] wr_sel  [S1],
  input  logic [AW-1:0] wr_addr [S1],
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [S1],
  input  logic [LW-1:0] out_sel [S1],
  output logic          out_valid,
  output cplx_t         out_data [S1]
);

  cplx_t         mem   [S1][DEPTH];
  cplx_t         rdata [S1];
  logic [LW-1:0] sel_q [S1];

  // stage 0 + stage 1 (write side)
  always_ff @(posedge clk) begin
    if (in_valid)
      for (int b = 0; b < S1; b++) mem[b][wr_addr[b]] <= in_data[wr_sel[b]];
  end

  // stage 1 (read side), registered
  always_ff @(posedge clk) begin
    if (rd_en)
      for (int b = 0; b < S1; b++) rdata[b] <= mem[b][rd_addr[b]];
    sel_q <= out_sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rd_en;
  end

  // stage 2
  always_comb begin
    for (int l = 0; l < S1; l++) out_data[l] = rdata[sel_q[l]];
  end

endmodule
