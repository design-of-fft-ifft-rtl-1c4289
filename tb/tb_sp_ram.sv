// tb_sp_ram: fills a 16 x 40 single-port RAM with random words, reads every
// address back in random order and checks that the data appears exactly one
// cycle after the read and that rdata holds during writes and idle cycles.
module tb_sp_ram;
  logic        clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [3:0]  addr = '0;
  logic [39:0] wdata = '0, rdata;
  logic [39:0] model [16];
  int checks = 0, failures = 0;

  sp_ram #(.DEPTH(16), .WIDTH(40)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 16; a++) begin
      model[a] = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      @(negedge clk); en = 1; we = 1; addr = 4'(a); wdata = model[a];
    end
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 16; i++) begin
        int a;
        a = (i * 7 + r * 3) % 16;
        @(negedge clk); en = 1; we = 0; addr = 4'(a);
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL: addr %0d read %h expected %h", a, rdata, model[a]);
        end
        // a write must not disturb rdata
        en = 1; we = 1; addr = 4'((a + 1) % 16); model[(a + 1) % 16] = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
        wdata = model[(a + 1) % 16];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL: rdata changed by a write");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
