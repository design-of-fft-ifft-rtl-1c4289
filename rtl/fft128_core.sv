// fft128_core: 128-point radix-2 / radix-8 / radix-8 decimation-in-frequency
// FFT that takes four complex samples per cycle and delivers eight.
//
// Algorithm. X(2k) is the 64-point DFT of g(n) = x(n) + x(n+64) and X(2k+1)
// that of h(n) = (x(n) - x(n+64)) W128^n. Each 64-point DFT is done as 8 x 8:
// with n = n1 + 8 n2 and k = 8 k2 + l, a first radix-8 pass over n2 gives
// Y(l, n1), which is multiplied by W64^(l n1); a second radix-8 pass over n1
// gives X64(8 k2 + l).
//
// Datapath. Input buffer B1 holds samples 0..63; during the second half of
// the symbol radix2_stage (4 butterflies, 4 twiddle multipliers) writes g and
// h into the 128-sample register set B2. The first radix8_bf then reads one
// group of eight samples per cycle (16 groups), the seven twiddle multipliers
// scale lanes 1..7 and the results are written back in place. The second
// radix8_bf reads the 16 groups again and drives the output: in output cycle
// t (group t = {half, l}) lane k carries X(16 k + 2 l + half), i.e. the even
// bins in cycles 0..7 and the odd bins in cycles 8..15.
//
// Schedule and in-place addressing. With symbols back to back the second
// radix-8 pass of symbol s runs in the very cycles in which the radix-2 stage
// writes symbol s+1, so the slots the radix-2 stage writes in a cycle are
// exactly those the second pass reads in that cycle. This holds if each
// symbol uses its own slot map: logical address {half, 6-bit index} is stored
// in slot rotl^r(a[6:2]), a[1:0], with r = symbol number mod 5.
//
// Interface and timing. in_valid high for 32 cycles per symbol, in_data beat
// b = samples 4b..4b+3. out_valid is high for 16 cycles per symbol, the first
// (out_first) 56 cycles after the symbol's first input beat; one symbol every
// 32 cycles is sustained. sat pulses when any requantisation clipped.
// Fixed point: output = DFT(x)/2 in 8-bit components (see fft_pkg).
// The split into a radix-2 and two radix-8 passes, the 4-in/8-out
// parallelism, the single in-place B2 and two radix-8 units follow the
// design; the exact cycle schedule, the rotating slot map and giving the
// radix-2 stage its own four multipliers (instead of sharing four of the
// seven with the radix-8 pass) are this design's choices.
module fft128_core
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cin_t   in_data [4],
  output logic   out_valid,
  output logic   out_first,
  output cdata_t out_data [8],
  output logic   sat
);

  localparam int BF_LAT  = 3;
  localparam int MUL_LAT = 3;

  // slot of logical address a for slot map r
  function automatic logic [6:0] slot(input logic [2:0] r, input logic [6:0] a);
    logic [4:0] f;
    f = a[6:2];
    for (int k = 0; k < 4; k++)
      if (k < int'(r)) f = {f[3:0], f[4]};
    return {f, a[1:0]};
  endfunction

  // ---------------- input buffer and radix-2 stage -------------------------
  logic       sym_last, pair_valid, pair_last;
  logic [3:0] pair_grp;
  cin_t       pair_lo [4], pair_hi [4];
  logic [2:0] rot_in;     // slot map of the symbol being received

  input_buffer u_b1 (
    .clk, .rst_n, .in_valid, .in_data, .sym_last,
    .pair_valid, .pair_grp, .pair_last, .pair_lo, .pair_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rot_in <= '0;
    else if (sym_last) rot_in <= (rot_in == 3'd4) ? 3'd0 : rot_in + 3'd1;
  end

  logic       r2_valid;
  logic [3:0] r2_grp;
  logic [3:0] r2_tag;     // {last, rot}
  cdata_t     r2_g [4], r2_h [4];
  logic       r2_sat;

  // pair_* lags sym_last by one cycle, when rot_in may already have moved on
  logic [2:0] pair_rot;
  always_ff @(posedge clk) if (in_valid) pair_rot <= rot_in;

  radix2_stage #(.TAG_W(4)) u_r2 (
    .clk, .rst_n, .in_valid(pair_valid), .in_grp(pair_grp),
    .in_tag({pair_last, pair_rot}), .x_lo(pair_lo), .x_hi(pair_hi),
    .out_valid(r2_valid), .out_grp(r2_grp), .out_tag(r2_tag),
    .g(r2_g), .h(r2_h), .sat(r2_sat));

  logic [6:0] wa_addr [8];
  cdata_t     wa_data [8];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      wa_addr[i]   = slot(r2_tag[2:0], {1'b0, r2_grp, 2'(i)});
      wa_addr[i+4] = slot(r2_tag[2:0], {1'b1, r2_grp, 2'(i)});
      wa_data[i]   = r2_g[i];
      wa_data[i+4] = r2_h[i];
    end
  end

  // ---------------- radix-8 pass controller --------------------------------
  // cnt 0..15: first pass reads group cnt; 16..31: second pass reads group cnt-16
  logic       act;
  logic [4:0] cnt;
  logic [2:0] rot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      cnt <= '0;
      rot <= '0;
    end else if (r2_valid && r2_tag[3]) begin
      act <= 1'b1;
      cnt <= '0;
      rot <= r2_tag[2:0];
    end else if (act) begin
      cnt <= cnt + 5'd1;
      if (cnt == 5'd31) act <= 1'b0;
    end
  end

  logic [6:0] r_addr [8];
  cdata_t     r_data [8];
  always_comb begin
    for (int p = 0; p < 8; p++) begin
      if (!cnt[4]) // first pass, group {half, n1}, lane n2: index 8*n2 + n1
        r_addr[p] = slot(rot, {cnt[3], 3'(p), cnt[2:0]});
      else         // second pass, group {half, l}, lane n1: index 8*l + n1
        r_addr[p] = slot(rot, {cnt[3], cnt[2:0], 3'(p)});
    end
  end

  // ---------------- first radix-8 pass with W64 twiddles --------------------
  logic signed [DW-1:0] rd_re [8], rd_im [8];
  logic signed [DW-1:0] y1_re [8], y1_im [8], y2_re [8], y2_im [8];
  logic                 bf1_sat, bf2_sat;

  always_comb
    for (int p = 0; p < 8; p++) begin
      rd_re[p] = r_data[p].re;
      rd_im[p] = r_data[p].im;
    end

  radix8_bf #(.IN_W(DW), .OUT_W(DW), .OUT_SHIFT(1)) u_bf1 (
    .clk, .x_re(rd_re), .x_im(rd_im), .y_re(y1_re), .y_im(y1_im), .sat(bf1_sat));

  // control delay lines: {valid, half, n1 or l, rot}
  logic       p1_v   [BF_LAT + MUL_LAT];
  logic [3:0] p1_grp [BF_LAT + MUL_LAT];
  logic [2:0] p1_rot [BF_LAT + MUL_LAT];
  logic       p2_v   [BF_LAT];
  logic [3:0] p2_grp [BF_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < BF_LAT + MUL_LAT; k++) p1_v[k] <= 1'b0;
      for (int k = 0; k < BF_LAT; k++)           p2_v[k] <= 1'b0;
    end else begin
      p1_v[0] <= act && !cnt[4];
      p2_v[0] <= act &&  cnt[4];
      for (int k = 1; k < BF_LAT + MUL_LAT; k++) p1_v[k] <= p1_v[k-1];
      for (int k = 1; k < BF_LAT; k++)           p2_v[k] <= p2_v[k-1];
    end
  end

  always_ff @(posedge clk) begin
    p1_grp[0] <= cnt[3:0];
    p1_rot[0] <= rot;
    p2_grp[0] <= cnt[3:0];
    for (int k = 1; k < BF_LAT + MUL_LAT; k++) begin
      p1_grp[k] <= p1_grp[k-1];
      p1_rot[k] <= p1_rot[k-1];
    end
    for (int k = 1; k < BF_LAT; k++) p2_grp[k] <= p2_grp[k-1];
  end

  // lane l of group n1 is multiplied by W64^(l*n1) = W128^(2*l*n1)
  coef_t                tw [8];
  logic signed [DW-1:0] z_re [8], z_im [8];
  logic signed [DW-1:0] z0_re [MUL_LAT], z0_im [MUL_LAT];
  logic                 msat [8];

  for (genvar l = 1; l < 8; l++) begin : g_tw
    logic [6:0] e;
    assign e = 7'(2 * l * int'(p1_grp[BF_LAT-1][2:0]));
    twiddle_rom u_rom (.idx(e), .coef(tw[l]));
    cmplx_mult #(.IN_W(DW), .OUT_W(DW), .OUT_SHIFT(COEF_F)) u_mul (
      .clk, .din_re(y1_re[l]), .din_im(y1_im[l]), .coef(tw[l]),
      .dout_re(z_re[l]), .dout_im(z_im[l]), .sat(msat[l]));
  end
  assign tw[0]   = '0;
  assign msat[0] = 1'b0;

  always_ff @(posedge clk) begin
    z0_re[0] <= y1_re[0];
    z0_im[0] <= y1_im[0];
    for (int k = 1; k < MUL_LAT; k++) begin
      z0_re[k] <= z0_re[k-1];
      z0_im[k] <= z0_im[k-1];
    end
  end
  assign z_re[0] = z0_re[MUL_LAT-1];
  assign z_im[0] = z0_im[MUL_LAT-1];

  logic       wb_en;
  logic [6:0] wb_addr [8];
  cdata_t     wb_data [8];
  logic [3:0] wgrp;
  logic [2:0] wrot;
  always_comb begin
    wb_en = p1_v[BF_LAT+MUL_LAT-1];
    wgrp  = p1_grp[BF_LAT+MUL_LAT-1];
    wrot  = p1_rot[BF_LAT+MUL_LAT-1];
    for (int l = 0; l < 8; l++) begin
      wb_addr[l]    = slot(wrot, {wgrp[3], 3'(l), wgrp[2:0]});
      wb_data[l].re = z_re[l];
      wb_data[l].im = z_im[l];
    end
  end

  b2_regfile u_b2 (
    .clk, .rst_n, .wa_en(r2_valid), .wa_addr, .wa_data,
    .wb_en, .wb_addr, .wb_data, .r_addr, .r_data);

  // ---------------- second radix-8 pass: core output -----------------------
  radix8_bf #(.IN_W(DW), .OUT_W(DW), .OUT_SHIFT(1)) u_bf2 (
    .clk, .x_re(rd_re), .x_im(rd_im), .y_re(y2_re), .y_im(y2_im), .sat(bf2_sat));

  logic mul_sat_any;
  always_comb begin
    mul_sat_any = 1'b0;
    for (int l = 1; l < 8; l++) mul_sat_any |= msat[l];
    out_valid = p2_v[BF_LAT-1];
    out_first = p2_v[BF_LAT-1] && (p2_grp[BF_LAT-1] == 4'd0);
    for (int k = 0; k < 8; k++) begin
      out_data[k].re = y2_re[k];
      out_data[k].im = y2_im[k];
    end
    sat = r2_sat | (p1_v[BF_LAT-1] & bf1_sat) | (wb_en & mul_sat_any)
        | (p2_v[BF_LAT-1] & bf2_sat);
  end

endmodule
