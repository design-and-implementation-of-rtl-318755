// bank_mem_tb: each cycle writes through all four ports to four different
// banks (a random rotation, as the interleaver produces) at random
// addresses and reads through all ports at random (bank, address) pairs,
// comparing with a model array.
module bank_mem_tb;
  localparam int NPE = 4, DEPTH = 600, W = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en [NPE];
  logic [1:0] wr_bank [NPE];
  logic [9:0] wr_addr [NPE];
  logic [W-1:0] wr_data [NPE];
  logic [1:0] rd_bank [NPE];
  logic [9:0] rd_addr [NPE];
  logic [W-1:0] rd_data [NPE];
  bank_mem dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] model [NPE][DEPTH];
  bit valid [NPE][DEPTH];

  initial begin
    for (int p = 0; p < NPE; p++) begin
      wr_en[p] = 0; wr_bank[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; rd_bank[p] = 0; rd_addr[p] = 0;
    end
    for (int n = 0; n < 3000; n++) begin
      int rot;
      @(negedge clk);
      rot = $urandom_range(0, 3);
      for (int p = 0; p < NPE; p++) begin
        wr_en[p]   = (n < 600) || ($urandom_range(0, 1) == 1);
        wr_bank[p] = 2'(p + rot);
        wr_addr[p] = (n < 600) ? 10'(n) : 10'($urandom_range(0, DEPTH - 1));
        wr_data[p] = $urandom;
        rd_bank[p] = 2'($urandom_range(0, 3));
        rd_addr[p] = 10'($urandom_range(0, DEPTH - 1));
      end
      #1;
      for (int p = 0; p < NPE; p++) if (valid[rd_bank[p]][rd_addr[p]]) begin
        checks++;
        if (rd_data[p] != model[rd_bank[p]][rd_addr[p]]) begin
          failures++; $display("bank %0d addr %0d mismatch", rd_bank[p], rd_addr[p]);
        end
      end
      for (int p = 0; p < NPE; p++) if (wr_en[p]) begin
        model[wr_bank[p]][wr_addr[p]] = wr_data[p];
        valid[wr_bank[p]][wr_addr[p]] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
