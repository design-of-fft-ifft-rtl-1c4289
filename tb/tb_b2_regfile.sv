// tb_b2_regfile: writes random data through write group A and write group B
// (disjoint slots in the same cycle), reads all 128 slots back through the
// eight read ports, and checks that a slot read in the cycle it is written
// returns its old value.
module tb_b2_regfile;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, wa_en = 1'b0, wb_en = 1'b0;
  logic [6:0] wa_addr [8], wb_addr [8], r_addr [8];
  cdata_t wa_data [8], wb_data [8], r_data [8];
  cdata_t model [128];
  int checks = 0, failures = 0;

  b2_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic read_all();
    for (int b = 0; b < 16; b++) begin
      for (int p = 0; p < 8; p++) r_addr[p] = 7'((p * 16 + b * 5) % 128);
      #1;
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (r_data[p] != model[r_addr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL: slot %0d read %h expected %h", r_addr[p], r_data[p], model[r_addr[p]]);
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin wa_addr[p] = '0; wb_addr[p] = '0; r_addr[p] = '0; wa_data[p] = '0; wb_data[p] = '0; end
    for (int r = 0; r < 4; r++) begin
      // fill: group A writes slots 8c..8c+3 and 64+.., group B 8c+4.. and 64+8c+4..
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        wa_en = 1; wb_en = 1;
        for (int p = 0; p < 8; p++) begin
          wa_addr[p] = 7'(8 * c + (p % 4) + 64 * (p / 4));
          wb_addr[p] = 7'(8 * c + 4 + (p % 4) + 64 * (p / 4));
          wa_data[p] = cdata_t'($urandom);
          wb_data[p] = cdata_t'($urandom);
        end
        for (int p = 0; p < 8; p++) r_addr[p] = wa_addr[p];
        #1;
        for (int p = 0; p < 8; p++) begin
          checks++;
          if (r >= 1 && r_data[p] != model[wa_addr[p]]) begin
            failures++;
            $display("FAIL: read-before-write of slot %0d", wa_addr[p]);
          end
        end
        for (int p = 0; p < 8; p++) begin
          model[wa_addr[p]] = wa_data[p];
          model[wb_addr[p]] = wb_data[p];
        end
      end
      @(negedge clk);
      wa_en = 0; wb_en = 0;
      read_all();
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
