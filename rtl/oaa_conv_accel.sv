// oaa_conv_accel: frequency-domain (overlap-and-add) convolution accelerator.
//
// Computes a CNN convolutional layer as
//   out[d_out] = sum over d_in of IFFT2( FFT2(tile[d_in]) .* FFT2(kernel[d_out][d_in]) )
// overlap-added tile by tile. The data path is the accelerator's
// "2D FFT + multiply-accumulate + 2D IFFT" with overlap-and-add:
//   host rows -> zero padding -> fft2d (forward) -> kernel_buffer / image_buffer
//   image_buffer, kernel_buffer -> hadamard_mac -> fft2d (inverse) -> oaa_unit
// Tiles are P x P (P = 16) FFT blocks holding an L x L input tile,
// L = P - F + 1, zero padded; kernels are F x F, zero padded to P x P.
//
// Operation:
//  1. Pulse `start` with cfg_din, cfg_dout and cfg_f. The output maps are
//     cleared and the accelerator expects the kernels: cfg_dout * cfg_din
//     kernels, d_out-major then d_in, each as P beats (rows) of P values of
//     which the first F rows and columns are used. They are transformed once
//     and kept in the kernel buffer.
//  2. Then, per input tile, cfg_din channels of P row beats, of which the
//     first L rows and columns are used; in_ty/in_tx (tile coordinates) are
//     taken with the first beat of the tile. Each tile's spectra go to one
//     half of the image buffer and are reused for every output channel.
//     While the MAC works on one half the next tile is loaded into the other
//     (transfer overlapped with computation); in_ready drops when both halves
//     are taken.
//  3. For each buffered tile and each d_out the MAC sums over d_in, the
//     inverse FFT returns the P x P block and oaa_unit adds it into output
//     map d_out at (in_ty*L, in_tx*L). tiles_done counts finished tiles.
//  4. When idle the host reads map elements through rd_*. Map element
//     (y, x) holds the full linear convolution at (y, x); a CNN "valid"
//     output of an N x N input is the region F-1 .. N-1 in each direction,
//     and a CNN cross-correlation needs the kernel given flipped.
// Everything in the host interface (beat format, tile order, handshake,
// map read port) is this design's own, standing in for the shared-memory
// link of the host platform, as are the buffer sizes. Data are FP32.
module oaa_conv_accel
  import oaa_pkg::*;
#(
  parameter int unsigned D_IN_MAX  = 64,
  parameter int unsigned D_OUT_MAX = 16,
  parameter int unsigned OUT_MAX   = 64,
  localparam int unsigned P        = FFT_P,
  localparam int unsigned BW       = $clog2(P),
  localparam int unsigned DIW      = $clog2(D_IN_MAX),
  localparam int unsigned DOW      = $clog2(D_OUT_MAX),
  localparam int unsigned XW       = $clog2(OUT_MAX),
  localparam int unsigned IAW      = $clog2(D_IN_MAX * P),
  localparam int unsigned KAW      = $clog2(D_OUT_MAX * D_IN_MAX * P)
) (
  input  logic           clk,
  input  logic           rst_n,
  // layer configuration
  input  logic           start,
  input  logic [DIW:0]   cfg_din,     // 1 .. D_IN_MAX
  input  logic [DOW:0]   cfg_dout,    // 1 .. D_OUT_MAX
  input  logic [BW:0]    cfg_f,       // kernel size, 1 .. P
  // kernel and image rows
  input  logic           in_valid,
  output logic           in_ready,
  input  fp32_t          in_data [P],
  input  logic [XW-1:0]  in_ty,
  input  logic [XW-1:0]  in_tx,
  // status
  output logic           busy,
  output logic           kernels_ready,
  output logic           computing,
  output logic [15:0]    tiles_done,
  output logic           mac_gated,   // a MAC multiplier was bypassed this cycle
  // output map read port
  input  logic           rd_en,
  input  logic [DOW-1:0] rd_ch,
  input  logic [XW-1:0]  rd_row,
  input  logic [XW-1:0]  rd_col,
  output fp32_t          rd_data
);

  typedef enum logic [1:0] {LD_IDLE, LD_KERN, LD_IMG} ld_e;
  typedef enum logic [1:0] {CP_IDLE, CP_RUN, CP_DRAIN} cp_e;

  ld_e  ld_st;
  cp_e  cp_st;

  logic [DIW:0]  din_q;
  logic [DOW:0]  dout_q;
  logic [BW:0]   f_q, l_q;

  // ---------------------------------------------------------------- load
  logic [BW-1:0] in_row;
  logic [KAW:0]  k_in_left, k_out_left;
  logic [DIW:0]  in_ch;
  logic          ld_half, wb_half, cp_half;
  logic [1:0]    img_full;
  logic [XW-1:0] ty_q [2];
  logic [XW-1:0] tx_q [2];
  logic [IAW-1:0] iw_addr;
  logic [KAW-1:0] kw_addr;
  logic          take;
  cplx_t         pad_row [P];

  assign in_ready = (ld_st == LD_KERN) || (ld_st == LD_IMG && !img_full[ld_half] &&
                    !(cp_st != CP_IDLE && cp_half == ld_half));
  assign take     = in_valid && in_ready;

  // zero padding: kernels keep F x F, image tiles keep L x L
  always_comb begin
    for (int c = 0; c < P; c++) begin
      logic keep;
      keep = (ld_st == LD_KERN) ? (c < int'(f_q) && int'(in_row) < int'(f_q))
                                : (c < int'(l_q) && int'(in_row) < int'(l_q));
      pad_row[c] = keep ? '{re: in_data[c], im: FP_ZERO} : C_ZERO;
    end
  end

  logic  f_v;
  cplx_t f_d [P];

  fft2d #(.P(P), .INV(1'b0)) u_fft (
    .clk, .rst_n, .in_valid(take), .in_data(pad_row), .out_valid(f_v), .out_data(f_d)
  );

  logic kb_we, ib_we;
  assign kb_we = f_v && (k_out_left != '0);
  assign ib_we = f_v && (k_out_left == '0);

  // ------------------------------------------------------------- compute
  logic [BW-1:0] cp_beat;
  logic [DIW:0]  cp_din;
  logic [DOW:0]  cp_dout;
  logic          rd_v, rd_first, rd_last;
  logic [BW-1:0] rd_beat;
  logic          cp_issue;
  logic [IAW-1:0] ib_raddr;
  logic [KAW-1:0] kb_raddr;
  cplx_t         ib_rdata [P];
  cplx_t         kb_rdata [P];

  assign cp_issue = (cp_st == CP_RUN);
  assign ib_raddr = IAW'(int'(cp_din) * P + int'(cp_beat));
  assign kb_raddr = KAW'((int'(cp_dout) * int'(din_q) + int'(cp_din)) * P + int'(cp_beat));

  kernel_buffer #(.P(P), .D_IN_MAX(D_IN_MAX), .D_OUT_MAX(D_OUT_MAX)) u_kbuf (
    .clk, .wr_en(kb_we), .wr_addr(kw_addr), .wr_data(f_d),
    .rd_en(cp_issue), .rd_addr(kb_raddr), .rd_data(kb_rdata)
  );

  image_buffer #(.P(P), .D_IN_MAX(D_IN_MAX)) u_ibuf (
    .clk, .wr_en(ib_we), .wr_half(wb_half), .wr_addr(iw_addr), .wr_data(f_d),
    .rd_en(cp_issue), .rd_half(cp_half), .rd_addr(ib_raddr), .rd_data(ib_rdata)
  );

  logic          m_v;
  cplx_t         m_d [P];
  logic [P-1:0]  m_gated;

  hadamard_mac #(.P(P)) u_mac (
    .clk, .rst_n, .in_valid(rd_v), .first(rd_first), .last(rd_last), .beat(rd_beat),
    .img(ib_rdata), .ker(kb_rdata), .out_valid(m_v), .out_data(m_d), .gated(m_gated)
  );
  assign mac_gated = rd_v && (|m_gated);

  logic  i_v;
  cplx_t i_d [P];

  fft2d #(.P(P), .INV(1'b1)) u_ifft (
    .clk, .rst_n, .in_valid(m_v), .in_data(m_d), .out_valid(i_v), .out_data(i_d)
  );

  // ------------------------------------------------------ overlap-and-add
  logic [BW-1:0] oa_row;
  logic [DOW:0]  oa_ch;
  fp32_t         oa_data [P];
  logic          oa_busy, oa_clr;
  logic [XW:0]   row0, col0;

  always_comb begin
    for (int c = 0; c < P; c++) oa_data[c] = i_d[c].re;   // imaginary part is rounding noise
  end
  // block origins beyond the map are clamped to OUT_MAX (all dropped)
  always_comb begin
    int unsigned oy, ox;
    oy   = int'(ty_q[cp_half]) * int'(l_q);
    ox   = int'(tx_q[cp_half]) * int'(l_q);
    row0 = (XW+1)'((oy > OUT_MAX) ? OUT_MAX : oy);
    col0 = (XW+1)'((ox > OUT_MAX) ? OUT_MAX : ox);
  end
  assign oa_clr = start;

  oaa_unit #(.P(P), .OUT_MAX(OUT_MAX), .D_OUT_MAX(D_OUT_MAX)) u_oaa (
    .clk, .rst_n, .clr(oa_clr), .busy(oa_busy),
    .in_valid(i_v), .ch(oa_ch[DOW-1:0]), .row0, .col0, .row(oa_row), .in_data(oa_data),
    .rd_en, .rd_ch, .rd_row, .rd_col, .rd_data
  );

  logic tile_finished;
  assign tile_finished = i_v && oa_row == BW'(P - 1) && oa_ch == dout_q - 1'b1;

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_st      <= LD_IDLE;
      cp_st      <= CP_IDLE;
      din_q      <= '0;
      dout_q     <= '0;
      f_q        <= '0;
      l_q        <= '0;
      in_row     <= '0;
      in_ch      <= '0;
      k_in_left  <= '0;
      k_out_left <= '0;
      ld_half    <= 1'b0;
      wb_half    <= 1'b0;
      cp_half    <= 1'b0;
      img_full   <= '0;
      ty_q       <= '{default: '0};
      tx_q       <= '{default: '0};
      iw_addr    <= '0;
      kw_addr    <= '0;
      cp_beat    <= '0;
      cp_din     <= '0;
      cp_dout    <= '0;
      rd_v       <= 1'b0;
      rd_first   <= 1'b0;
      rd_last    <= 1'b0;
      rd_beat    <= '0;
      oa_row     <= '0;
      oa_ch      <= '0;
      tiles_done <= '0;
    end else if (start) begin
      ld_st      <= LD_KERN;
      cp_st      <= CP_IDLE;
      din_q      <= cfg_din;
      dout_q     <= cfg_dout;
      f_q        <= cfg_f;
      l_q        <= (BW+1)'(P) - cfg_f + 1'b1;
      in_row     <= '0;
      in_ch      <= '0;
      k_in_left  <= (KAW+1)'(int'(cfg_din) * int'(cfg_dout) * P);
      k_out_left <= (KAW+1)'(int'(cfg_din) * int'(cfg_dout) * P);
      ld_half    <= 1'b0;
      wb_half    <= 1'b0;
      cp_half    <= 1'b0;
      img_full   <= '0;
      iw_addr    <= '0;
      kw_addr    <= '0;
      rd_v       <= 1'b0;
      oa_row     <= '0;
      oa_ch      <= '0;
      tiles_done <= '0;
    end else begin
      logic [1:0] full_n;
      full_n = img_full;

      // input side
      if (take) begin
        in_row <= in_row + 1'b1;
        if (ld_st == LD_KERN) begin
          k_in_left <= k_in_left - 1'b1;
          if (k_in_left == 1) begin
            ld_st  <= LD_IMG;
            in_row <= '0;
          end
        end else begin
          if (in_row == '0 && in_ch == '0) begin
            ty_q[ld_half] <= in_ty;
            tx_q[ld_half] <= in_tx;
          end
          if (in_row == BW'(P - 1)) begin
            in_ch <= in_ch + 1'b1;
            if (in_ch == din_q - 1'b1) begin
              in_ch   <= '0;
              ld_half <= ~ld_half;
            end
          end
        end
      end

      // transform write-back
      if (kb_we) begin
        kw_addr    <= kw_addr + 1'b1;
        k_out_left <= k_out_left - 1'b1;
      end
      if (ib_we) begin
        iw_addr <= iw_addr + 1'b1;
        if (iw_addr == IAW'(int'(din_q) * P - 1)) begin
          iw_addr         <= '0;
          full_n[wb_half] = 1'b1;
          wb_half        <= ~wb_half;
        end
      end

      // read issue for the MAC
      rd_v     <= cp_issue;
      rd_first <= (cp_din == '0);
      rd_last  <= (cp_din == din_q - 1'b1);
      rd_beat  <= cp_beat;

      case (cp_st)
        CP_IDLE:
          if (img_full[cp_half] && k_out_left == '0 && !oa_busy) begin
            cp_st   <= CP_RUN;
            cp_beat <= '0;
            cp_din  <= '0;
            cp_dout <= '0;
          end
        CP_RUN: begin
          cp_beat <= cp_beat + 1'b1;
          if (cp_beat == BW'(P - 1)) begin
            cp_din <= cp_din + 1'b1;
            if (cp_din == din_q - 1'b1) begin
              cp_din  <= '0;
              cp_dout <= cp_dout + 1'b1;
              if (cp_dout == dout_q - 1'b1) cp_st <= CP_DRAIN;
            end
          end
        end
        default:
          if (tile_finished) begin
            full_n[cp_half] = 1'b0;
            cp_half    <= ~cp_half;
            cp_st      <= CP_IDLE;
            tiles_done <= tiles_done + 1'b1;
          end
      endcase

      // overlap-and-add beat counters
      if (i_v) begin
        oa_row <= oa_row + 1'b1;
        if (oa_row == BW'(P - 1)) begin
          oa_ch <= (oa_ch == dout_q - 1'b1) ? '0 : oa_ch + 1'b1;
        end
      end

      img_full <= full_n;
    end
  end

  assign busy          = (ld_st == LD_KERN) || (cp_st != CP_IDLE) || (|img_full) || oa_busy || f_v;
  assign kernels_ready = (ld_st == LD_IMG) && (k_out_left == '0);
  assign computing     = (cp_st != CP_IDLE);

endmodule
