// Workload testbench: the worst-case flow of the 4x4-mesh experiment, a
// master writing transactions of 14 transfers at the start of every 256-cycle
// window (rho = 14/256 = 0.0547 transfers/cycle, sigma = 13.27 unregulated),
// sent through the W-channel regulator of axi_flow_regulator_top under the
// three regulation strengths, with integer parameters:
//   unregulated  (n, m, sigma) = (1, 1, 14)   the whole transaction at once
//   medium       (18, 1, 7)                   sigma' = 7, rho' = 1/18
//   strong       (18, 1, 1)                   one transfer every 18 cycles
// rho' = 1/18 = 0.0556 >= 0.0547, so every window's 14 transfers leave
// within that window (no loss of rate). For each case the testbench measures
// the longest back-to-back run on the regulated output (its burstiness) and
// the longest time a transfer is held at the master, and checks them against
// the values the parameters imply, and that every window of t output cycles
// holds at most sigma + m * ceil(t / n) transfers.
module workload_f41_tb;
  import flow_reg_pkg::*;
  localparam int DW = 32, IW = 4, PERIOD = 256, SIZE = 14, PERIODS = 4;

  logic clk = 0, rst_n = 0;
  logic w_tbl_we = 0, r_tbl_we = 0;
  logic [1:0] w_tbl_idx = '0, r_tbl_idx = '0;
  table_entry_t w_tbl_entry = '0, r_tbl_entry = '0;
  logic s_wvalid = 0, s_wready, s_wlast = 0;
  flow_id_t s_wfid = '0;
  logic [DW-1:0] s_wdata = '0, m_wdata;
  logic [DW/8-1:0] s_wstrb = '1, m_wstrb;
  logic m_wvalid, m_wready = 1, m_wlast;
  logic w_reconfig, w_unknown_flow, r_reconfig, r_unknown_flow;
  logic [2:0] w_active, r_active;
  logic ar_valid = 0, ar_ready = 0;
  logic [IW-1:0] ar_id = '0, s_rid = '0, m_rid;
  flow_id_t ar_fid = '0;
  logic s_rvalid = 0, s_rready, s_rlast = 0, m_rvalid, m_rready = 1, m_rlast;
  logic [DW-1:0] s_rdata = '0, m_rdata;
  logic [1:0] s_rresp = '0, m_rresp;

  int checks = 0, failures = 0, cyc = 0;

  axi_flow_regulator_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  int outs[$];
  int run = 0, max_run = 0, n_out = 0, last_out = -100, min_gap = 1000000;
  always @(posedge clk) begin
    if (m_wvalid && m_wready) begin
      run = (last_out == cyc - 1) ? run + 1 : 1;
      if (last_out >= 0 && cyc - last_out < min_gap) min_gap = cyc - last_out;
      if (run > max_run) max_run = run;
      outs.push_back(cyc);
      last_out = cyc;
      n_out++;
    end
    cyc <= cyc + 1;
  end

  task automatic run_case(string name, int fid, int n, int m, int s,
                          int exp_run, int exp_hold_max);
    int hold_max = 0;
    @(negedge clk);
    w_tbl_we = 1; w_tbl_idx = 2'(fid % 3);
    w_tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    @(negedge clk);
    w_tbl_we = 0;
    run = 0; max_run = 0; n_out = 0; last_out = -100; min_gap = 1000000;
    outs.delete();
    for (int p = 0; p < PERIODS; p++) begin
      int start, sent;
      start = cyc;
      sent = 0;
      for (int k = 0; k < SIZE; k++) begin
        s_wvalid = 1; s_wfid = FID_W'(fid); s_wdata = DW'($urandom); s_wlast = (k == SIZE - 1);
        #1;
        while (!s_wready) begin @(negedge clk); #1; end
        if (cyc - start > hold_max) hold_max = cyc - start;
        @(negedge clk);
      end
      s_wvalid = 0;
      checks++;
      if (cyc - start > PERIOD) begin
        failures++;
        $display("%s: period %0d needed %0d cycles", name, p, cyc - start);
      end
      while (cyc - start < PERIOD) @(negedge clk);
    end
    expect_($sformatf("%s: %0d transfers out", name, n_out), n_out == SIZE * PERIODS);
    expect_($sformatf("%s: longest run %0d, expected %0d", name, max_run, exp_run), max_run == exp_run);
    expect_($sformatf("%s: longest hold %0d, expected at most %0d", name, hold_max, exp_hold_max),
            hold_max <= exp_hold_max);
    // (sigma, rho) envelope: at most sigma + m * ceil(t / n) transfers in any
    // window of t cycles. The bank may be full when a window starts and the
    // next token comes at the counter's phase, so two transfers can be closer
    // than n cycles even at sigma = 1.
    for (int i = 0; i < outs.size(); i++)
      for (int j = i; j < outs.size() && j < i + 20; j++) begin
        int len, bound;
        len   = outs[j] - outs[i] + 1;
        bound = s + m * ((len + n - 1) / n);
        checks++;
        if (j - i + 1 > bound) begin
          failures++;
          $display("%s: %0d transfers in %0d cycles", name, j - i + 1, len);
        end
      end
    $display("%s: longest back-to-back run %0d transfers, longest hold %0d cycles, smallest gap %0d",
             name, max_run, hold_max, min_gap);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // hold bounds: load (2) + (SIZE - sigma) tokens one n apart + one phase
    run_case("unregulated", 10, 1, 1, 14, 14, 2 + 13);
    run_case("medium",      11, 18, 1, 7, 7, 2 + 1 + (SIZE - 7 + 1) * 18);
    run_case("strong",      12, 18, 1, 1, 1, 2 + 1 + (SIZE - 1 + 1) * 18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
