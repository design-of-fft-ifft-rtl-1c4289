// sp_ram: single-port synchronous RAM, the register-transfer stand-in for the
// 16-word single-port SRAM macros used by the input buffer (16 x 40 bit), the
// reorder buffer (8 x 16 x 16 bit) and the output buffer (16 x 64 bit).
//
// One access per cycle: when en is high the word at addr is written with
// wdata (we = 1) or read (we = 0). A read returns the word on rdata in the
// next cycle; rdata holds its value otherwise. A write does not update rdata.
// Contents are not reset, as in a real SRAM; every user writes a word before
// it reads it.
module sp_ram #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 40
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
