// input_buffer: input buffer B1 of the FFT core and the symbol beat counter.
//
// A 128-point symbol arrives as 32 consecutive beats of four complex samples
// (beat b carries x(4b) .. x(4b+3)). Beats 0..15, samples 0..63, are written
// into a 16 x 40-bit single-port RAM, one word of four 10-bit samples per
// beat. During beats 16..31 the RAM is read at address b-16, so that each
// sample x(n+64) arriving on the input is presented together with x(n): the
// operand pairs of the first radix-2 stage.
//
// Interface: in_valid must stay high for the 32 beats of a symbol; symbols may
// follow each other back to back or with idle cycles between them.
// Timing: the pair of beat 16+c leaves on pair_* one cycle later (RAM read
// latency), with pair_grp = c and pair_last on c = 15. sym_last marks the
// last input beat of a symbol. Reset clears the beat counter.
// The 16-cycle buffering and the 16 x 40 RAM follow the design; the valid
// protocol is this design's choice.
module input_buffer
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cin_t       in_data [4],
  output logic       sym_last,
  output logic       pair_valid,
  output logic [3:0] pair_grp,
  output logic       pair_last,
  output cin_t       pair_lo [4],   // x(n),    n = 4*pair_grp + lane
  output cin_t       pair_hi [4]    // x(n+64)
);

  localparam int WW = 4 * $bits(cin_t);

  logic [4:0]    beat;
  logic [WW-1:0] wword, rword;
  cin_t          hi_q [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat       <= '0;
      pair_valid <= 1'b0;
      pair_grp   <= '0;
      pair_last  <= 1'b0;
    end else begin
      if (in_valid) beat <= beat + 5'd1;
      pair_valid <= in_valid && beat[4];
      pair_grp   <= beat[3:0];
      pair_last  <= in_valid && (beat == 5'd31);
    end
  end

  always_ff @(posedge clk) hi_q <= in_data;

  always_comb begin
    for (int i = 0; i < 4; i++) wword[i*$bits(cin_t) +: $bits(cin_t)] = in_data[i];
    for (int i = 0; i < 4; i++) pair_lo[i] = rword[i*$bits(cin_t) +: $bits(cin_t)];
    pair_hi  = hi_q;
    sym_last = in_valid && (beat == 5'd31);
  end

  sp_ram #(.DEPTH(16), .WIDTH(WW)) u_ram (
    .clk, .en(in_valid), .we(!beat[4]), .addr(beat[3:0]),
    .wdata(wword), .rdata(rword));

endmodule
