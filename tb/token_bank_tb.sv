// Testbench of token_bank: random token and sent pulses against a reference
// saturating counter (size max(sigma, 1)), with several sigma values,
// including the sigma = 0 and sigma = 1 corner cases.
module token_bank_tb;
  import flow_reg_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, token = 0, sent = 0;
  logic [SIGMA_W-1:0] sigma = '0;
  logic [SIGMA_W-1:0] x;
  logic enable;
  int checks = 0, failures = 0;
  int ref_x, ref_max, n_sat = 0;

  token_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (int'(x) != ref_x || enable !== (ref_x < ref_max)) begin
      failures++;
      $display("x=%0d enable=%0b, expected x=%0d enable=%0b", x, enable, ref_x, ref_x < ref_max);
    end
  endtask

  initial begin
    int sig_list[5] = '{0, 1, 2, 7, 14};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    ref_x = 0; ref_max = 1;
    check_state();
    foreach (sig_list[s]) begin
      sigma = SIGMA_W'(sig_list[s]);
      load  = 1;
      @(negedge clk);
      load = 0;
      ref_max = (sig_list[s] > 1) ? sig_list[s] : 1;
      ref_x   = ref_max;
      check_state();
      for (int k = 0; k < 400; k++) begin
        token = ($urandom_range(0, 2) == 0);
        sent  = (ref_x > 0) && ($urandom_range(0, 2) == 0);
        if (token && ref_x == ref_max && !sent) n_sat++;
        @(negedge clk);
        if (token && ref_x < ref_max) ref_x++;
        if (sent) ref_x--;
        check_state();
      end
      token = 0; sent = 0;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
