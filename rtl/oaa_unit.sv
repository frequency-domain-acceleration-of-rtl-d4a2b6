// oaa_unit: overlap-and-add of output tiles into the output feature maps.
//
// Each IFFT result is a P x P block of the linear convolution of an L x L
// input tile (L = P - F + 1) with an F x F kernel. Blocks of neighbouring
// tiles overlap by F - 1 rows and columns, so every block is added into the
// output map at its origin (row0, col0) = (ty * L, tx * L). A beat carries
// one block row of P values (beat index `row`); it is added with a
// read-modify-write into P memory banks, bank b holding map columns
// c = b (mod P), so the P consecutive columns of a beat hit P different banks
// (the lanes are rotated by col0 mod P). Positions outside the OUT_MAX x
// OUT_MAX map are dropped. `clr` zeroes all maps first (OUT_MAX^2 *
// D_OUT_MAX / P cycles, `busy` high). A host read port returns one map
// element one cycle after rd_en.
//
// Overlap-and-add at stride L follows the accelerator; holding the full
// output maps on chip, the banking and the sizes are this design's choices.
// Timing: one beat per cycle; a beat is read in its first cycle and written
// back in the next, so two beats in flight never address the same word as
// long as consecutive beats carry different rows (true within a block).
module oaa_unit
  import oaa_pkg::*;
#(
  parameter int unsigned P         = FFT_P,
  parameter int unsigned OUT_MAX   = 64,
  parameter int unsigned D_OUT_MAX = 16,
  localparam int unsigned CW       = $clog2(D_OUT_MAX),
  localparam int unsigned XW       = $clog2(OUT_MAX),
  localparam int unsigned LW       = $clog2(P),
  localparam int unsigned DEPTH    = D_OUT_MAX * OUT_MAX * (OUT_MAX / P),
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  output logic          busy,
  input  logic          in_valid,
  input  logic [CW-1:0] ch,
  input  logic [XW:0]   row0,       // block origin, may reach OUT_MAX
  input  logic [XW:0]   col0,
  input  logic [LW-1:0] row,        // block row carried by this beat
  input  fp32_t         in_data [P],
  input  logic          rd_en,
  input  logic [CW-1:0] rd_ch,
  input  logic [XW-1:0] rd_row,
  input  logic [XW-1:0] rd_col,
  output fp32_t         rd_data
);

  localparam int unsigned CPB = OUT_MAX / P;   // words per map row per bank

  fp32_t mem [P][DEPTH];

  logic [AW-1:0] clr_addr;
  logic          clearing;

  // Stage 1: address and lane rotation
  logic [AW-1:0] addr_q [P];
  logic          ok_q   [P];
  fp32_t         val_q  [P];
  fp32_t         old_q  [P];
  logic          v_q;

  function automatic logic [AW-1:0] word_addr(logic [CW-1:0] c, int unsigned r, int unsigned col);
    return AW'((int'(c) * OUT_MAX + r) * CPB + col / P);
  endfunction

  always_ff @(posedge clk) begin
    for (int b = 0; b < P; b++) begin
      int unsigned lane, r, c;
      lane = (b - int'(col0 % P) + P) % P;
      r    = int'(row0) + int'(row);
      c    = int'(col0) + lane;
      ok_q[b]   <= in_valid && r < OUT_MAX && c < OUT_MAX;
      addr_q[b] <= word_addr(ch, r, c);
      val_q[b]  <= in_data[lane];
      old_q[b]  <= mem[b][word_addr(ch, r, c)];
    end
    v_q <= in_valid;
    if (rd_en) begin
      for (int b = 0; b < P; b++)
        if (b == int'(rd_col % P)) rd_data <= mem[b][word_addr(rd_ch, rd_row, rd_col)];
    end
  end

  // Stage 2: add and write back, or clear
  always_ff @(posedge clk) begin
    for (int b = 0; b < P; b++) begin
      if (clearing)         mem[b][clr_addr] <= FP_ZERO;
      else if (v_q && ok_q[b]) mem[b][addr_q[b]] <= fp_add(old_q[b], val_q[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0;
      clr_addr <= '0;
    end else if (clr) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
    end
  end

  assign busy = clearing || clr;

endmodule
