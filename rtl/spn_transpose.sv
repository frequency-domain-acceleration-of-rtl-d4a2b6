// spn_transpose: streaming P x P matrix transpose built on the SPN.
//
// Input: tiles of P beats, beat r carrying row r (lane c = column c).
// Output: the same tiles transposed, beat c carrying column c (lane r).
// Element (r, c) is stored in bank (r + c) mod P at address r of the half
// being filled: every input beat then writes P different banks (stage 0 is a
// rotation by r) and every output beat reads P different banks (bank
// (r + c) mod P holds (r, c) at address r, so stage 2 is a rotation by c).
// The two halves of each bank are used ping-pong, so one tile is written
// while the previous one is read and tiles can arrive back to back.
//
// Matrix transpose by streaming permutation between the row and column FFTs
// is the accelerator's scheme; the skewed bank mapping and ping-pong control
// are this design's choice. Timing: the first output beat of a tile appears
// 2 cycles after its last input beat, then one beat per cycle. The producer
// must not start a third tile while two are unread (never happens at one
// beat per cycle in and out).
module spn_transpose
  import oaa_pkg::*;
#(
  parameter int unsigned P = FFT_P,
  localparam int unsigned LW = $clog2(P),
  localparam int unsigned AW = LW + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data [P],
  output logic  out_valid,
  output cplx_t out_data [P]
);

  logic [LW-1:0] wr_row, rd_col;
  logic          wr_half, rd_half;
  logic [1:0]    full;            // half h holds a complete unread tile
  logic          rd_active;

  logic [LW-1:0] wr_sel  [P];
  logic [AW-1:0] wr_addr [P];
  logic [AW-1:0] rd_addr [P];
  logic [LW-1:0] out_sel [P];

  always_comb begin
    for (int b = 0; b < P; b++) begin
      wr_sel[b]  = LW'(b) - wr_row;             // bank b <- lane (b - r) mod P
      wr_addr[b] = {wr_half, wr_row};
      rd_addr[b] = {rd_half, LW'(b) - rd_col};  // row (b - c) mod P
      out_sel[b] = LW'(b) + rd_col;             // lane r <- bank (r + c) mod P
    end
  end

  assign rd_active = full[rd_half];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row  <= '0;
      rd_col  <= '0;
      wr_half <= 1'b0;
      rd_half <= 1'b0;
      full    <= '0;
    end else begin
      logic [1:0] f;
      f = full;
      if (in_valid) begin
        wr_row <= wr_row + 1'b1;
        if (wr_row == LW'(P - 1)) begin
          f[wr_half] = 1'b1;
          wr_half   <= ~wr_half;
        end
      end
      if (rd_active) begin
        rd_col <= rd_col + 1'b1;
        if (rd_col == LW'(P - 1)) begin
          f[rd_half] = 1'b0;
          rd_half   <= ~rd_half;
        end
      end
      full <= f;
    end
  end

  // A write into a half that still holds an unread tile would lose data.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !full[wr_half])
    else $error("spn_transpose: input overran an unread tile");

  spn #(.S1(P), .DEPTH(2 * P)) u_spn (
    .clk, .rst_n,
    .in_valid, .in_data, .wr_sel, .wr_addr,
    .rd_en(rd_active), .rd_addr, .out_sel,
    .out_valid, .out_data
  );

endmodule
