// fft128_top: 128-point FFT/IFFT module for a multiband-OFDM UWB physical
// layer. It transforms one 128-sample OFDM symbol every 32 cycles from four
// parallel 5-bit complex samples per cycle, so at 132 MHz it keeps up with
// the 528 Msample/s stream (one symbol per 242.42 ns FFT period).
//
// It chains fft128_core with the optional reorder_buffer and output_buffer;
// the parameters select the four combinations of the design:
//   USE_REORDER USE_OUTBUF  output                         latency (cycles)
//        0          0       8 lanes, DIF order             56
//        0          1       4 lanes, out of order          59
//        1          0       8 lanes, natural order         75
//        1          1       4 lanes, natural order         78  (default)
// Latency is from a symbol's first input beat to out_first.
//
// Interface: in_valid high for the 32 beats of a symbol, beat b carrying
// samples 4b..4b+3 on in_data[0..3]; symbols back to back or with gaps. ifft
// is sampled on a symbol's first beat and travels with the symbol: in IFFT
// mode the reorder buffer emits X((128 - n) mod 128) as output n, which is
// 128 * IDFT(x)(n); it has no effect without the reorder buffer. Output
// values are 8-bit, scaled as DFT/2. sat pulses when a requantisation in the
// core clipped.
module fft128_top
  import fft_pkg::*;
#(
  parameter  bit USE_REORDER = 1'b1,
  parameter  bit USE_OUTBUF  = 1'b1,
  localparam int OUT_LANES   = USE_OUTBUF ? 4 : 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cin_t   in_data [4],
  input  logic   ifft,
  output logic   out_valid,
  output logic   out_first,
  output cdata_t out_data [OUT_LANES],
  output logic   sat
);

  logic   c_valid, c_first;
  cdata_t c_data [8];

  fft128_core u_core (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(c_valid), .out_first(c_first), .out_data(c_data), .sat);

  // mode of each symbol in flight, from its first input beat to the core output
  logic [4:0] beat;
  logic [1:0] mwp, mrp;
  logic       mode_fifo [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat <= '0;
      mwp  <= '0;
      mrp  <= '0;
    end else begin
      if (in_valid) beat <= beat + 5'd1;
      if (in_valid && beat == 5'd0) mwp <= mwp + 2'd1;
      if (c_first) mrp <= mrp + 2'd1;
    end
  end

  always_ff @(posedge clk)
    if (in_valid && beat == 5'd0) mode_fifo[mwp] <= ifft;

  logic   r_valid, r_first;
  cdata_t r_data [8];

  if (USE_REORDER) begin : g_reorder
    reorder_buffer #(.SPLIT(USE_OUTBUF)) u_reorder (
      .clk, .rst_n, .in_valid(c_valid), .in_data(c_data),
      .ifft(mode_fifo[mrp]),
      .out_valid(r_valid), .out_first(r_first), .out_data(r_data));
  end else begin : g_no_reorder
    assign r_valid = c_valid;
    assign r_first = c_first;
    assign r_data  = c_data;
  end

  if (USE_OUTBUF) begin : g_outbuf
    output_buffer u_outbuf (
      .clk, .rst_n, .in_valid(r_valid), .in_data(r_data),
      .out_valid, .out_first, .out_data);
  end else begin : g_no_outbuf
    assign out_valid = r_valid;
    assign out_first = r_first;
    for (genvar q = 0; q < OUT_LANES; q++) begin : g_lane
      assign out_data[q] = r_data[q];
    end
  end

endmodule
