// b2_regfile: intermediate register set B2 of the FFT core, 128 complex
// samples of 8+8 bits held in flip-flops and updated in place.
//
// Its ports give the bandwidth the pipelined schedule needs in one cycle: a
// read group of eight combinational read ports and two write groups of eight
// write ports each (A for the radix-2 stage, B for the write-back of the first
// radix-8 stage). A write takes effect at the clock edge, so a slot read and
// written in the same cycle reads its old value. The two write groups never
// address the same slot in one cycle (the schedule guarantees it and an
// assertion checks it); B would win. The contents are not reset: every slot
// is written by the radix-2 stage before it is read.
module b2_regfile
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,     // only qualifies the collision check
  input  logic       wa_en,
  input  logic [6:0] wa_addr [8],
  input  cdata_t     wa_data [8],
  input  logic       wb_en,
  input  logic [6:0] wb_addr [8],
  input  cdata_t     wb_data [8],
  input  logic [6:0] r_addr  [8],
  output cdata_t     r_data  [8]
);

  cdata_t mem [128];

  always_ff @(posedge clk) begin
    if (wa_en)
      for (int p = 0; p < 8; p++) mem[wa_addr[p]] <= wa_data[p];
    if (wb_en)
      for (int p = 0; p < 8; p++) mem[wb_addr[p]] <= wb_data[p];
  end

  always_comb
    for (int p = 0; p < 8; p++) r_data[p] = mem[r_addr[p]];

  always_ff @(posedge clk) begin
    if (rst_n && wa_en && wb_en)
      for (int p = 0; p < 8; p++)
        for (int q = 0; q < 8; q++)
          assert (wa_addr[p] != wb_addr[q])
            else $error("b2_regfile: write groups collide on slot %0d", wa_addr[p]);
  end

endmodule
