// reorder_buffer: turns the core's decimation-in-frequency output order into
// natural order (FFT mode) or into the index-reversed order X((128-n) mod 128)
// that makes the same transform an inverse FFT (IFFT mode).
//
// The core delivers a symbol in 16 cycles of 8 samples; in cycle t lane j
// holds X(16 j + 2 t) for t < 8 and X(16 j + 2 (t-8) + 1) for t >= 8. Eight
// 16 x 16-bit single-port RAMs form a bank. An input rotate multiplexer puts
// lane j of cycle t into RAM (j + t) mod 8 for t < 8 and RAM (j + 15 - t) mod 8
// for t >= 8, at address t. With this interleaving any eight samples
// {8m .. 8m+7}, and also any {4m .. 4m+3, 64+4m .. 64+4m+3}, lie in eight
// different RAMs, so after the whole symbol has been written it is read back
// in 16 cycles, each RAM with its own address, and an output rotate
// multiplexer returns the samples to their lanes.
//
// SPLIT = 0: read cycle m gives X(8m + q) on lane q.
// SPLIT = 1: lanes 0..3 give X(4m + q), lanes 4..7 X(64 + 4m + q - 4); this
//            is the order the 8-to-4 output buffer needs to stream the
//            symbol sequentially.
// IFFT mode reads the same sets in reverse order (m' = 15 - m) and reverses
// the lanes. The one sample of each lane group that belongs to the previous
// read set is taken from a holding register; for the very first read it is
// X(0) (and X(64) when SPLIT = 1), kept aside while the symbol is written.
//
// Interface: in_valid high for the 16 cycles of a burst, bursts at least 32
// cycles apart; ifft is sampled with the first sample of a burst.
// Timing: out_valid for 16 cycles, the first (out_first) 19 cycles after the
// first input cycle: one input register, 16 write cycles, RAM read, output
// register. The RAM bank, the rotate multiplexers, the address pattern, the
// pre-buffering of X(0) and the 19-cycle latency follow the design; the
// SPLIT order is this design's way of feeding the output buffer.
module reorder_buffer
  import fft_pkg::*;
#(
  parameter bit SPLIT = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cdata_t in_data [8],
  input  logic   ifft,
  output logic   out_valid,
  output logic   out_first,
  output cdata_t out_data [8]
);

  localparam int SW = $bits(cdata_t);

  // bank location of sample k: {ram, address}
  function automatic logic [6:0] loc(input logic [6:0] k);
    logic [2:0] j, l;
    j = k[6:4];
    l = k[3:1];
    if (k[0]) return {3'(j + 3'd7 - l), 1'b1, l};
    else      return {3'(j + l),        1'b0, l};
  endfunction

  // ---------------- write side ----------------
  logic       v_q;
  cdata_t     d_q [8];
  logic [3:0] wcnt;
  logic       mode_w;         // mode of the symbol being written
  cdata_t     pre0, pre64;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      wcnt <= '0;
    end else begin
      v_q <= in_valid;
      if (v_q) wcnt <= wcnt + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    d_q <= in_data;
    if (in_valid && !v_q) mode_w <= ifft;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre0  <= '0;
      pre64 <= '0;
    end else if (v_q && wcnt == 4'd0) begin
      pre0  <= d_q[0];       // X(0)
      pre64 <= d_q[4];       // X(64)
    end
  end

  // ---------------- read side control ----------------
  logic       ract;
  logic [3:0] rcnt;
  logic       mode_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ract   <= 1'b0;
      rcnt   <= '0;
      mode_r <= 1'b0;
    end else if (v_q && wcnt == 4'd15) begin
      ract   <= 1'b1;
      rcnt   <= '0;
      mode_r <= mode_w;
    end else if (ract) begin
      rcnt <= rcnt + 4'd1;
      if (rcnt == 4'd15) ract <= 1'b0;
    end
  end

  // samples read in this cycle, by read lane p
  logic [3:0] mr;
  logic [6:0] k_p   [8];
  logic [2:0] ram_p [8];
  logic [3:0] adr_p [8];

  always_comb begin
    mr = mode_r ? 4'd15 - rcnt : rcnt;
    for (int p = 0; p < 8; p++) begin
      if (SPLIT) k_p[p] = (p < 4) ? {1'b0, mr, 2'(p)} : {1'b1, mr, 2'(p - 4)};
      else       k_p[p] = {mr, 3'(p)};
      {ram_p[p], adr_p[p]} = loc(k_p[p]);
    end
  end

  // ---------------- RAM bank with rotate multiplexers ----------------
  logic [3:0]    shift_w;
  logic [SW-1:0] rdata [8];

  assign shift_w = wcnt[3] ? 4'd15 - wcnt : wcnt;   // rotation of the write

  for (genvar r = 0; r < 8; r++) begin : g_ram
    logic [3:0]    addr;
    logic [SW-1:0] wdata;
    always_comb begin
      wdata = d_q[3'(r - int'(shift_w))];
      addr  = wcnt;
      if (!v_q) begin
        addr = '0;
        for (int p = 0; p < 8; p++)
          if (ram_p[p] == 3'(r)) addr = adr_p[p];
      end
    end
    sp_ram #(.DEPTH(16), .WIDTH(SW)) u_ram (
      .clk, .en(v_q || ract), .we(v_q), .addr, .wdata, .rdata(rdata[r]));
  end

  // ---------------- output side ----------------
  logic       rv_q;
  logic [3:0] rcnt_q;
  logic       mode_q;
  logic [2:0] ram_q [8];
  cdata_t     e [8];
  cdata_t     hold_lo, hold_hi;
  cdata_t     o [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_q      <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      rv_q      <= ract;
      out_valid <= rv_q;
      out_first <= rv_q && rcnt_q == 4'd0;
    end
  end

  always_ff @(posedge clk) begin
    rcnt_q <= rcnt;
    mode_q <= mode_r;
    ram_q  <= ram_p;
    out_data <= o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_lo <= '0;
      hold_hi <= '0;
    end else if (rv_q) begin
      hold_lo <= e[0];
      hold_hi <= e[4];
    end
  end

  always_comb begin
    for (int p = 0; p < 8; p++) e[p] = rdata[ram_q[p]];
    for (int q = 0; q < 8; q++) o[q] = mode_q ? e[(8 - q) % 8] : e[q];
    if (mode_q) begin
      if (SPLIT) begin
        o[0] = (rcnt_q == 4'd0) ? pre0  : hold_hi;
        o[4] = (rcnt_q == 4'd0) ? pre64 : hold_lo;
      end else begin
        o[0] = (rcnt_q == 4'd0) ? pre0  : hold_lo;
      end
    end
  end

  // the single-port bank cannot write and read in one cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(v_q && ract))
    else $error("reorder_buffer: burst arrived while reading");

endmodule
