// Testbench of flow_regulator.
//  1. The periodic flow of 8 back-to-back transfers every 40 cycles under
//     (n, m, sigma) = (5, 1, 1), rho = 0.2: the transfers must leave evenly,
//     one every 5 cycles (the first gap after loading may be 6), and all 8
//     of each period within it.
//  2. The same flow with (1, 1, 8): no regulation effect, 8 back to back.
//  3. Random input and back-pressure under (8, 3, 4): Ready is compared each
//     cycle with a reference token-bucket model, data order is checked, and
//     every output window of t cycles must hold at most
//     sigma + m * ceil(t / n) transfers.
module flow_regulator_tb;
  import flow_reg_pkg::*;
  localparam int DW = 16;

  logic clk = 0, rst_n = 0, cfg_load = 0;
  reg_params_t cfg = '0;
  logic in_valid = 0, out_ready = 1;
  logic in_ready, out_valid, full;
  logic [DW-1:0] in_data = '0, out_data;
  logic [SIGMA_W-1:0] tokens;
  int checks = 0, failures = 0;

  flow_regulator #(.DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int rn, rm, rmax, rx, rk;
  bit rfull;
  logic [DW-1:0] q[$];
  int out_times[$];
  int cyc = 0;

  task automatic configure(int n, int m, int s);
    @(negedge clk);
    cfg.n = N_W'(n); cfg.m = M_W'(m); cfg.sigma = SIGMA_W'(s);
    cfg_load = 1;
    @(posedge clk);
    rn = n; rm = m; rmax = (s > 1) ? s : 1; rx = rmax; rk = 0;
    @(negedge clk);
    cfg_load = 0;
  endtask

  // One cycle: inputs are set at the negedge before; check and advance.
  task automatic step();
    bit exp_ready, tok, snt;
    #1;
    exp_ready = (rx > int'(rfull)) && (!rfull || out_ready);
    checks++;
    if (in_ready !== exp_ready || out_valid !== rfull) begin
      failures++;
      $display("t=%0d ready=%0b exp %0b valid=%0b exp %0b x=%0d/%0d", cyc, in_ready, exp_ready,
               out_valid, rfull, tokens, rx);
    end
    if (rfull) begin
      checks++;
      if (out_data !== q[0]) begin failures++; $display("t=%0d data mismatch", cyc); end
    end
    tok = ((rk % rn) < rm) && (rx < rmax);
    snt = rfull && out_ready;
    @(posedge clk);
    if (snt) begin void'(q.pop_front()); out_times.push_back(cyc); end
    if (in_valid && exp_ready) q.push_back(in_data);
    rx = rx + int'(tok) - int'(snt);
    rfull = (in_valid && exp_ready) ? 1'b1 : (snt ? 1'b0 : rfull);
    rk++;
    cyc++;
    @(negedge clk);
  endtask

  // Periodic source: `size` transfers offered back to back at each period start.
  task automatic periodic(int size, int period, int periods);
    int pending = 0;
    for (int t = 0; t < period * periods; t++) begin
      if (t % period == 0) pending += size;
      in_valid = (pending > 0);
      in_data  = DW'($urandom);
      #1;
      if (in_valid && in_ready) pending--;
      #0;
      step();
    end
    in_valid = 0;
    checks++;
    if (pending != 0) begin failures++; $display("%0d transfers left over", pending); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    rfull = 0; rx = 0; rn = 1; rm = 0; rmax = 1; rk = 0;

    // 1. strong regulation of the (1, 1, 6.6, 0.2) flow
    configure(5, 1, 1);
    out_times.delete();
    periodic(8, 40, 3);
    checks++;
    if (out_times.size() != 24) begin failures++; $display("strong: %0d out", out_times.size()); end
    for (int i = 1; i < out_times.size(); i++) begin
      checks++;
      // the first token after loading is lost to the full bank, so the first
      // gap may be one cycle longer; from then on the spacing is exactly n
      if (out_times[i] - out_times[i-1] != 5 && !(i == 1 && out_times[1] - out_times[0] == 6)) begin
        failures++;
        $display("strong: spacing %0d at %0d", out_times[i] - out_times[i-1], i);
      end
    end

    // 2. no regulation effect
    configure(1, 1, 8);
    out_times.delete();
    periodic(8, 40, 2);
    for (int i = 1; i < 8; i++) begin
      checks++;
      if (out_times[i] - out_times[i-1] != 1) begin failures++; $display("unregulated: gap"); end
    end

    // 3. random traffic against the reference and the envelope
    configure(8, 3, 4);
    out_times.delete();
    for (int t = 0; t < 2000; t++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = DW'($urandom);
      out_ready = ($urandom_range(0, 4) != 0);
      step();
    end
    in_valid = 0; out_ready = 1;
    for (int i = 0; i < out_times.size(); i++) begin
      for (int j = i; j < out_times.size() && j < i + 40; j++) begin
        int len, bound;
        len   = out_times[j] - out_times[i] + 1;
        bound = 4 + 3 * ((len + 7) / 8);
        checks++;
        if (j - i + 1 > bound) begin
          failures++;
          $display("envelope: %0d transfers in %0d cycles", j - i + 1, len);
        end
      end
    end
    checks++;
    if (out_times.size() < 500) begin failures++; $display("random: only %0d out", out_times.size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
