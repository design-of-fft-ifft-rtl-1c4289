// output_buffer: 8-parallel to 4-parallel converter behind the FFT core.
//
// A symbol arrives as a burst of 16 cycles of eight samples and leaves as 32
// cycles of four samples, so the output runs at the rate of the input of the
// core. Of each eight-sample word, lanes 0..3 go straight to the output while
// lanes 4..7 are written into a 16 x 64-bit single-port RAM; after the burst
// the RAM is read back in the following 16 cycles. Fed by the reorder buffer
// in its split order (X(4m..4m+3) on lanes 0..3, X(64+4m..) on lanes 4..7)
// the result is X(0..127) in sequence; fed by the core directly it is an
// out-of-order stream.
//
// Interface: in_valid high for the 16 cycles of a burst, bursts at least 32
// cycles apart. Timing: out_valid for 32 consecutive cycles, the first
// (out_first) 3 cycles after the first input cycle (input register, pass
// register, output register).
// The half-direct, half-stored scheme, the 16 x 64 RAM and the 3-cycle
// latency follow the design; the counters are this design's.
module output_buffer
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cdata_t in_data [8],
  output logic   out_valid,
  output logic   out_first,
  output cdata_t out_data [4]
);

  localparam int SW = $bits(cdata_t);

  logic          v1, v2, rv;
  cdata_t        d1 [8];
  cdata_t        d2 [4];
  logic [3:0]    wc, rc;
  logic          ract, first2;
  logic [4*SW-1:0] wword, rword;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; rv <= 1'b0;
      wc <= '0;   rc <= '0;   ract <= 1'b0;
      first2 <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      first2 <= v1 && wc == 4'd0;
      if (v1) wc <= wc + 4'd1;
      if (v1 && wc == 4'd15) begin
        ract <= 1'b1;
        rc   <= '0;
      end else if (ract) begin
        rc <= rc + 4'd1;
        if (rc == 4'd15) ract <= 1'b0;
      end
      rv        <= ract;
      out_valid <= v2 || rv;
      out_first <= first2;
    end
  end

  always_ff @(posedge clk) begin
    d1 <= in_data;
    for (int i = 0; i < 4; i++) d2[i] <= d1[i];
    if (v2) out_data <= d2;
    else for (int i = 0; i < 4; i++) out_data[i] <= rword[i*SW +: SW];
  end

  always_comb
    for (int i = 0; i < 4; i++) wword[i*SW +: SW] = d1[i+4];

  sp_ram #(.DEPTH(16), .WIDTH(4*SW)) u_ram (
    .clk, .en(v1 || ract), .we(v1), .addr(v1 ? wc : rc),
    .wdata(wword), .rdata(rword));

  assert property (@(posedge clk) disable iff (!rst_n) !(v1 && ract))
    else $error("output_buffer: burst arrived while reading");

endmodule
