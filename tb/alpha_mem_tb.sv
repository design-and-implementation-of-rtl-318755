// alpha_mem_tb: writes wrapping metric vectors with known true values (a
// random base anywhere in the range plus offsets below two quadrants)
// across the 3L depth and checks that each read returns the stored metrics
// extended so that their differences equal the true differences and their
// low MW bits equal the stored bits.
module alpha_mem_tb;
  import turbo_pkg::*;
  localparam int DEPTH = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [4:0] waddr, raddr;
  metric_vec_t wdata;
  metric_ext_t rdata [NSTATE];
  alpha_mem dut (.*);
  int checks = 0, failures = 0;
  int d_mem [DEPTH][8];
  metric_vec_t m_mem [DEPTH];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int n = 0; n < 400; n++) begin
      int a, base;
      @(negedge clk);
      a = n % DEPTH;
      base = $urandom_range(0, (1 << MW) - 1);
      we = 1; waddr = 5'(a);
      for (int s = 0; s < 8; s++) begin
        d_mem[a][s] = $urandom_range(0, 2000);
        wdata[s] = metric_t'(base + d_mem[a][s]);
      end
      m_mem[a] = wdata;
      if (n >= DEPTH) begin
        raddr = 5'($urandom_range(0, DEPTH - 1));
        if (raddr == waddr) raddr = 5'((a + 1) % DEPTH);
        #1;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (metric_t'(rdata[s]) != m_mem[raddr][s] ||
              int'(rdata[s]) - int'(rdata[0]) != d_mem[raddr][s] - d_mem[raddr][0]) begin
            failures++; $display("addr %0d state %0d wrong", raddr, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
