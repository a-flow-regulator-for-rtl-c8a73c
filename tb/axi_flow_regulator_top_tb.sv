// End-to-end testbench of axi_flow_regulator_top at its default parameters.
//
// Write side: a master model sends write-data transfers of four flows over
// one W channel, each flow in bursts; the parameter table holds three flows
// at a time, and midway one entry is rewritten for a fourth flow, which then
// takes over the least recently used regulator. The interconnect applies
// random back-pressure. Read side: read requests of two flows are observed on
// AR and the slave model returns read bursts, again under back-pressure.
// Checks: every transfer arrives once, in order, with its payload; every
// flow's output stays within sigma + m * ceil(t / n) in every window of t
// cycles since its regulator was loaded; a first transfer waits two cycles.
// Each mechanism must occur at least once: regulator load, replacement of a
// regulator, token stall, back-to-back burst from a full bank, bank
// saturation, output back-pressure, unknown flow, response flow recovery.
module axi_flow_regulator_top_tb;
  import flow_reg_pkg::*;
  localparam int DW = 32, IW = 4;

  logic clk = 0, rst_n = 0;
  logic w_tbl_we = 0, r_tbl_we = 0;
  logic [1:0] w_tbl_idx = '0, r_tbl_idx = '0;
  table_entry_t w_tbl_entry = '0, r_tbl_entry = '0;
  logic s_wvalid = 0, s_wready, s_wlast = 0;
  flow_id_t s_wfid = '0;
  logic [DW-1:0] s_wdata = '0, m_wdata;
  logic [DW/8-1:0] s_wstrb = '0, m_wstrb;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  // flow parameters (n, m, sigma) by flow ID, as written to the tables
  int pn [32], pm [32], ps [32];

  // mechanism counters
  int n_load = 0, n_replace = 0, n_token_stall = 0, n_burst = 0, n_saturated = 0;
  int n_backpressure = 0, n_unknown = 0, n_r_load = 0, n_r_beats = 0, n_r_stall = 0;

  // write-side scoreboard
  typedef struct packed { flow_id_t f; logic [DW-1:0] d; logic [DW/8-1:0] s; logic l; } w_t;
  w_t wq[$];
  int w_out [32][$];
  flow_id_t last_acc_fid = '0;
  int last_acc_cyc = -10;
  logic [2:0] prev_active = '0;
  logic [2:0] below = '0, bank_en;
  assign bank_en = {dut.u_w_reg.g_reg[2].u_reg.u_bank.enable,
                    dut.u_w_reg.g_reg[1].u_reg.u_bank.enable,
                    dut.u_w_reg.g_reg[0].u_reg.u_bank.enable};

  // read-side scoreboard
  typedef struct packed { logic [IW-1:0] id; logic [DW-1:0] d; logic [1:0] r; logic l; } r_t;
  r_t rq[$];
  int r_out [32][$];
  int id_flow [16];

  always @(posedge clk) if (rst_n) begin
    // W output
    if (m_wvalid && m_wready) begin
      w_t it;
      it = wq.pop_front();
      checks++;
      if ({m_wdata, m_wstrb, m_wlast} !== {it.d, it.s, it.l}) begin
        failures++; $display("cycle %0d: W payload mismatch", cyc);
      end
      w_out[it.f].push_back(cyc);
    end
    if (m_wvalid && !m_wready) n_backpressure++;
    // W input
    if (s_wvalid && s_wready) begin
      wq.push_back('{f: s_wfid, d: s_wdata, s: s_wstrb, l: s_wlast});
      if (last_acc_fid == s_wfid && last_acc_cyc == cyc - 1) n_burst++;
      last_acc_fid = s_wfid; last_acc_cyc = cyc;
    end
    if (s_wvalid && !s_wready && w_active != '0 && !w_reconfig && m_wready) n_token_stall++;
    if (w_reconfig) begin
      n_load++;
      if (prev_active == 3'b111) n_replace++;
      w_out[s_wfid].delete();            // the envelope restarts at each load
    end
    prev_active <= w_active;
    if (w_unknown_flow) n_unknown++;
    // saturation: a W regulator whose bank was drawn down has refilled to
    // its maximum, so the comparator is disabled and tokens are dropped
    if (w_reconfig) below <= '0;
    else begin
      for (int i = 0; i < 3; i++) if (bank_en[i]) below[i] <= 1'b1;
      for (int i = 0; i < 3; i++) if (below[i] && !bank_en[i] && w_active[i]) n_saturated++;
    end
    // R side
    if (m_rvalid && m_rready) begin
      r_t b;
      b = rq.pop_front();
      checks++;
      if ({m_rid, m_rdata, m_rresp, m_rlast} !== b) begin failures++; $display("cycle %0d: R payload", cyc); end
      r_out[id_flow[b.id]].push_back(cyc);
      n_r_beats++;
    end
    if (s_rvalid && s_rready) rq.push_back('{id: s_rid, d: s_rdata, r: s_rresp, l: s_rlast});
    if (s_rvalid && !s_rready) n_r_stall++;
    if (r_reconfig) n_r_load++;
    cyc <= cyc + 1;
  end

  task automatic w_write(int idx, int fid, int n, int m, int s);
    @(negedge clk);
    w_tbl_we = 1; w_tbl_idx = 2'(idx);
    w_tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    pn[fid] = n; pm[fid] = m; ps[fid] = s;
    @(negedge clk);
    w_tbl_we = 0;
  endtask

  task automatic r_write(int idx, int fid, int n, int m, int s);
    @(negedge clk);
    r_tbl_we = 1; r_tbl_idx = 2'(idx);
    r_tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    pn[fid] = n; pm[fid] = m; ps[fid] = s;
    @(negedge clk);
    r_tbl_we = 0;
  endtask

  task automatic envelope(string side, int f, input int times [$]);
    int n, m, s;
    n = pn[f]; m = pm[f]; s = (ps[f] > 1) ? ps[f] : 1;
    for (int i = 0; i < times.size(); i++)
      for (int j = i; j < times.size() && j < i + 64; j++) begin
        int len, bound;
        len   = times[j] - times[i] + 1;
        bound = s + m * ((len + n - 1) / n);
        checks++;
        if (j - i + 1 > bound) begin
          failures++;
          $display("%s flow %0d: %0d transfers in %0d cycles", side, f, j - i + 1, len);
        end
      end
  endtask

  // Master: `bursts` write bursts of random flows from `flows`, random gaps.
  task automatic master(int flows [$], int bursts);
    for (int b = 0; b < bursts; b++) begin
      int f, len;
      f   = flows[$urandom_range(0, flows.size() - 1)];
      len = $urandom_range(1, 8);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        s_wvalid = 1; s_wfid = FID_W'(f); s_wdata = DW'($urandom);
        s_wstrb = 4'($urandom); s_wlast = (k == len - 1);
        #1;
        while (!s_wready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      s_wvalid = 0;
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
  endtask

  // Slave side: requests, then read bursts returned by the slave.
  task automatic slave_side();
    int ids[4] = '{1, 2, 6, 7};
    int flw[4] = '{20, 21, 20, 21};
    foreach (ids[i]) begin
      @(negedge clk);
      ar_valid = 1; ar_ready = 1; ar_id = IW'(ids[i]); ar_fid = FID_W'(flw[i]);
      id_flow[ids[i]] = flw[i];
    end
    @(negedge clk);
    ar_valid = 0; ar_ready = 0;
    for (int b = 0; b < 30; b++) begin
      int id, len;
      id  = ids[$urandom_range(0, 3)];
      len = $urandom_range(1, 6);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        s_rvalid = 1; s_rid = IW'(id); s_rdata = DW'($urandom);
        s_rresp = 2'($urandom); s_rlast = (k == len - 1);
        #1;
        while (!s_rready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      s_rvalid = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  endtask

  initial begin
    int wait_c;
    for (int i = 0; i < 16; i++) id_flow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    w_write(0, 1, 5, 1, 1);       // strong: sigma = 1, rho = 0.2
    w_write(1, 2, 8, 3, 4);       // medium
    w_write(2, 3, 1, 1, 16);      // no regulation effect
    r_write(0, 20, 6, 1, 2);
    r_write(1, 21, 2, 1, 4);

    // latency of a first transfer: two extra cycles
    @(negedge clk);
    s_wvalid = 1; s_wfid = 2; s_wdata = DW'($urandom); s_wstrb = '1; s_wlast = 1;
    wait_c = 0;
    #1;
    while (!s_wready) begin @(negedge clk); wait_c++; #1; end
    @(negedge clk);
    s_wvalid = 0;
    expect_($sformatf("first transfer waited %0d cycles", wait_c), wait_c == 2);

    // an unknown flow is held until its entry exists
    fork
      begin
        @(negedge clk);
        s_wvalid = 1; s_wfid = 9; s_wdata = DW'($urandom); s_wlast = 1;
        #1;
        while (!s_wready) begin @(negedge clk); #1; end
        @(negedge clk);
        s_wvalid = 0;
      end
      begin
        repeat (6) @(negedge clk);
        w_write(2, 9, 2, 1, 2);   // replaces flow 3's entry
      end
    join
    w_write(2, 3, 1, 1, 16);

    fork
      begin
        master('{1, 2, 3}, 40);
        w_write(0, 4, 3, 1, 3);   // flow 4 replaces flow 1's table entry
        master('{2, 3, 4}, 40);
      end
      slave_side();
      begin
        for (int k = 0; k < 6000; k++) begin
          @(negedge clk);
          m_wready = ($urandom_range(0, 4) != 0);
          m_rready = ($urandom_range(0, 4) != 0);
        end
      end
    join_any
    wait fork;
    m_wready = 1; m_rready = 1;
    repeat (5) @(negedge clk);

    expect_("all W transfers delivered", wq.size() == 0);
    expect_("all R beats delivered", rq.size() == 0);
    for (int f = 1; f <= 4; f++) envelope("W", f, w_out[f]);
    envelope("R", 20, r_out[20]);
    envelope("R", 21, r_out[21]);

    $display("mechanisms: load=%0d replace=%0d token_stall=%0d burst=%0d saturated=%0d",
             n_load, n_replace, n_token_stall, n_burst, n_saturated);
    $display("            backpressure=%0d unknown=%0d r_load=%0d r_beats=%0d r_stall=%0d",
             n_backpressure, n_unknown, n_r_load, n_r_beats, n_r_stall);
    expect_("regulator load", n_load > 0);
    expect_("regulator replacement", n_replace > 0);
    expect_("token stall", n_token_stall > 0);
    expect_("back-to-back burst", n_burst > 0);
    expect_("bank saturation", n_saturated > 0);
    expect_("output back-pressure", n_backpressure > 0);
    expect_("unknown flow", n_unknown > 0);
    expect_("slave-side load", n_r_load >= 2);
    expect_("slave-side beats", n_r_beats > 20);
    expect_("slave-side stall", n_r_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
