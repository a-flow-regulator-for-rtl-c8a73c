// Workload testbench: one master of the 12-master mesh experiment. Each
// master talks to two slaves, so its W-channel regulator carries two flows.
// Here the two flows take the extremes of the evaluated range: flow 1 writes
// 16 transfers per 256-cycle window (rho = 0.0625) and flow 2 writes 2
// transfers per window (rho = 0.0078). At the start of each window the
// master queues one transaction of each flow (at most two outstanding) and
// sends them in order, each transaction's transfers back to back as far as
// the regulator allows. The regulator is run with
//   unregulated  flow 1 (1, 1, 16),   flow 2 (1, 1, 2)
//   medium       flow 1 (16, 1, 8),   flow 2 (128, 1, 2)
//   strong       flow 1 (14, 1, 1),   flow 2 (32, 1, 1)
// In the strong case the rates are rounded up from 1/16 and 1/128. The two
// flows share one in-order channel, so while one flow waits for a token the
// other cannot send, and with a bank of one the waiting flow's tokens are
// lost; at exactly 1/16 and 1/128 the master's backlog grows without bound.
// 14 * 15 + 32 = 242 < 256 cycles leaves room for both transactions.
// For all cases the testbench checks that all transfers are delivered in
// order, that the number of transfers waiting at the master never exceeds
// the two outstanding transactions (18), that flow 1 never goes back to back
// under strong regulation, and each flow's (sigma, rho) envelope.
module workload_master_tb;
  import flow_reg_pkg::*;
  localparam int DW = 32, IW = 4, PERIOD = 256, WINDOWS = 6;

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

  typedef struct packed { flow_id_t f; logic [DW-1:0] d; } item_t;
  item_t q[$];
  int outs [8][$];
  int backlog = 0, max_backlog = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_wvalid && m_wready) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (m_wdata !== it.d) begin failures++; $display("cycle %0d: data order", cyc); end
      outs[it.f].push_back(cyc);
    end
    if (s_wvalid && s_wready) q.push_back('{f: s_wfid, d: s_wdata});
    cyc <= cyc + 1;
  end

  task automatic write(int idx, int fid, int n, int m, int s);
    @(negedge clk);
    w_tbl_we = 1; w_tbl_idx = 2'(idx);
    w_tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    @(negedge clk);
    w_tbl_we = 0;
  endtask

  task automatic envelope(string name, int f, int n, int m, int s);
    for (int i = 0; i < outs[f].size(); i++)
      for (int j = i; j < outs[f].size() && j < i + 24; j++) begin
        int len, bound;
        len   = outs[f][j] - outs[f][i] + 1;
        bound = s + m * ((len + n - 1) / n);
        checks++;
        if (j - i + 1 > bound) begin
          failures++;
          $display("%s flow %0d: %0d transfers in %0d cycles", name, f, j - i + 1, len);
        end
      end
  endtask

  // Transfers generated at window starts; the master sends them in order.
  task automatic run_case(string name, int fa, int fb, int na, int sa, int nb, int sb);
    int pend_a = 0, pend_b = 0, sent = 0, b2b = 0, last_a = -10;
    outs[fa].delete(); outs[fb].delete();
    max_backlog = 0;
    @(negedge clk);
    for (int t = 0; t < PERIOD * (WINDOWS + 2); t++) begin
      if (t % PERIOD == 0 && t < PERIOD * WINDOWS) begin
        pend_a += 16;
        pend_b += 2;
      end
      if (pend_a + pend_b > max_backlog) max_backlog = pend_a + pend_b;
      s_wvalid = (pend_a + pend_b > 0);
      s_wfid   = (pend_a > 0) ? FID_W'(fa) : FID_W'(fb);
      s_wdata  = DW'($urandom);
      #1;
      if (s_wvalid && s_wready) begin
        if (pend_a > 0) begin
          pend_a--;
          if (last_a == t - 1) b2b++;
          last_a = t;
        end else pend_b--;
        sent++;
      end
      @(negedge clk);
    end
    s_wvalid = 0;
    repeat (3) @(negedge clk);
    expect_($sformatf("%s: %0d of %0d transfers sent", name, sent, 18 * WINDOWS), sent == 18 * WINDOWS);
    expect_($sformatf("%s: backlog %0d above two transactions", name, max_backlog), max_backlog <= 18);
    expect_($sformatf("%s: flow 1 delivered", name), outs[fa].size() == 16 * WINDOWS);
    expect_($sformatf("%s: flow 2 delivered", name), outs[fb].size() == 2 * WINDOWS);
    if (sa == 1)
      expect_($sformatf("%s: flow 1 went back to back %0d times", name, b2b), b2b == 0);
    else
      expect_($sformatf("%s: flow 1 bursts", name), b2b >= (sa - 1) * (WINDOWS - 1));
    envelope(name, fa, na, 1, sa);
    envelope(name, fb, nb, 1, sb);
    $display("%s: peak backlog at the master %0d transfers, flow 1 back-to-back pairs %0d",
             name, max_backlog, b2b);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // each case under flow IDs of its own, so that regulators are loaded
    // with that case's parameters
    write(0, 1, 1, 1, 16);
    write(1, 2, 1, 1, 2);
    run_case("unregulated", 1, 2, 1, 16, 1, 2);
    write(0, 3, 16, 1, 8);
    write(1, 4, 128, 1, 2);
    run_case("medium", 3, 4, 16, 8, 128, 2);
    write(0, 5, 14, 1, 1);
    write(1, 6, 32, 1, 1);
    run_case("strong", 5, 6, 14, 1, 32, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
