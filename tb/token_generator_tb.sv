// Testbench of token_generator: for several (n, m) it checks, cycle by cycle,
// that a token is issued exactly in the first m cycles of every n-cycle period
// after a load (m tokens per n cycles), and that no token is issued while the
// bank disables the comparator.
module token_generator_tb;
  import flow_reg_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, enable = 0;
  logic [N_W-1:0] n;
  logic [M_W-1:0] m;
  logic token;
  int checks = 0, failures = 0;

  token_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nn, int mm, int periods);
    int tokens = 0, exp_tokens;
    @(negedge clk);
    n = N_W'(nn); m = M_W'(mm); load = 1; enable = 1;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < nn * periods; k++) begin
      bit exp = ((k % (nn < 1 ? 1 : nn)) < mm);
      checks++;
      if (token !== exp) begin
        failures++;
        $display("n=%0d m=%0d cycle %0d: token=%0b expected %0b", nn, mm, k, token, exp);
      end
      tokens += int'(token);
      @(negedge clk);
    end
    exp_tokens = (mm > nn ? nn : mm) * periods;
    checks++;
    if (tokens != exp_tokens) begin
      failures++;
      $display("n=%0d m=%0d: %0d tokens, expected %0d", nn, mm, tokens, exp_tokens);
    end
  endtask

  initial begin
    n = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 1, 8);      // rho = 0.2, one token every 5 cycles
    run(8, 3, 6);
    run(18, 1, 4);
    run(128, 7, 3);
    run(255, 16, 2);   // largest n of the 8-bit counter
    run(4, 4, 5);      // m = n: every cycle
    run(6, 0, 3);      // m = 0: never
    run(1, 1, 10);
    // comparator disabled: no tokens at all
    @(negedge clk);
    n = 5; m = 5; load = 1; enable = 0;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < 20; k++) begin
      checks++;
      if (token) begin failures++; $display("token while disabled"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
