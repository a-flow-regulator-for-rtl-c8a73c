// Testbench of axi_slave_regulator. Read requests with AXI IDs 1, 2 and 5
// are observed on AR, tagged with flows 4, 6 and 8; the slave model then
// returns bursts of read data with those IDs. Checks: the flow of each
// response is found from its ID (each flow's spacing follows its own
// parameters: flow 4 (4, 1, 1) one beat per 4 cycles after the first, flow 6
// (1, 1, 8) back to back), the first beat of a flow waits two cycles for its
// regulator to load, the R payload (ID, data, response, last) passes
// unchanged and in order, and a response with an unrecorded ID is held as an
// unknown flow (flow 0 has no entry).
module axi_slave_regulator_tb;
  import flow_reg_pkg::*;
  localparam int DW = 32, IW = 4;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [1:0] tbl_idx = '0;
  table_entry_t tbl_entry = '0;
  logic ar_valid = 0, ar_ready = 0;
  logic [IW-1:0] ar_id = '0;
  flow_id_t ar_fid = '0;
  logic s_rvalid = 0, s_rready, s_rlast = 0;
  logic [IW-1:0] s_rid = '0, m_rid;
  logic [DW-1:0] s_rdata = '0, m_rdata;
  logic [1:0] s_rresp = '0, m_rresp;
  logic m_rvalid, m_rready = 1, m_rlast;
  logic reconfig, unknown_flow;
  logic [2:0] active;
  int checks = 0, failures = 0, cyc = 0, first_offer = 0;

  axi_slave_regulator #(.DATA_W(DW), .ID_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  typedef struct packed { logic [IW-1:0] id; logic [DW-1:0] d; logic [1:0] r; logic l; } beat_t;
  beat_t q[$];
  int acc_t [16][$];
  always @(posedge clk) if (rst_n) begin
    if (m_rvalid && m_rready) begin
      beat_t b;
      b = q.pop_front();
      checks++;
      if ({m_rid, m_rdata, m_rresp, m_rlast} !== b) begin failures++; $display("cycle %0d: R payload", cyc); end
    end
    if (s_rvalid && s_rready) begin
      q.push_back('{id: s_rid, d: s_rdata, r: s_rresp, l: s_rlast});
      acc_t[s_rid].push_back(cyc);
    end
    cyc <= cyc + 1;
  end

  task automatic write(int idx, int fid, int n, int m, int s);
    @(negedge clk);
    tbl_we = 1; tbl_idx = 2'(idx);
    tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    @(negedge clk);
    tbl_we = 0;
  endtask

  task automatic request(int id, int fid);
    @(negedge clk);
    ar_valid = 1; ar_id = IW'(id); ar_fid = FID_W'(fid);
    ar_ready = 0;
    @(negedge clk);
    ar_ready = 1;              // handshake in the second cycle
    @(negedge clk);
    ar_valid = 0; ar_ready = 0;
  endtask

  // The slave returns a burst of `len` beats with ID `id`.
  task automatic burst(int id, int len);
    for (int b = 0; b < len; b++) begin
      @(negedge clk);
      s_rvalid = 1; s_rid = IW'(id); s_rdata = DW'($urandom);
      s_rresp = 2'($urandom); s_rlast = (b == len - 1);
      if (b == 0) first_offer = cyc;
      #1;
      while (!s_rready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    s_rvalid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    write(0, 4, 4, 1, 1);
    write(1, 6, 1, 1, 8);
    write(2, 8, 3, 2, 2);
    request(1, 4);
    request(2, 6);
    request(5, 8);
    request(3, 4);
    burst(1, 6);
    expect_("flow 4: first beat after two load cycles", acc_t[1][0] - first_offer == 2);
    for (int i = 2; i < 6; i++)
      expect_($sformatf("flow 4 spacing %0d", acc_t[1][i] - acc_t[1][i-1]), acc_t[1][i] - acc_t[1][i-1] == 4);
    burst(2, 8);
    for (int i = 1; i < 8; i++)
      expect_("flow 6 back to back", acc_t[2][i] - acc_t[2][i-1] == 1);
    burst(5, 4);
    expect_("flow 8: first beat after two load cycles", acc_t[5][0] - first_offer == 2);
    expect_("three flows active", active == 3'b111);
    burst(3, 2);               // ID 3 also belongs to flow 4
    expect_("ID 3 mapped to the already active flow 4", acc_t[3].size() == 2);
    // unrecorded ID 9: flow 0, not in the table
    fork
      burst(9, 1);
      begin
        repeat (5) @(negedge clk);
        expect_("unrecorded ID held", acc_t[9].size() == 0 && unknown_flow);
        write(2, 0, 1, 1, 1);
      end
    join
    expect_("unrecorded ID passes once flow 0 has an entry", acc_t[9].size() == 1);
    repeat (4) @(negedge clk);
    expect_("all beats delivered", q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
