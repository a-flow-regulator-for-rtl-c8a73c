// Testbench of multiflow_regulator with a three-entry table and three
// regulators.
//  - First transfer of a flow: accepted two cycles after it is offered (one
//    cycle to read the table, one to load a regulator); later transfers of
//    an active flow are accepted in the cycle they are offered when a token
//    is free.
//  - (5, 1, 1): one transfer per 5 cycles; (1, 1, 4): back to back;
//  - a flow missing from the table is held and flagged; once its entry is
//    written it replaces the least recently used flow.
//  - Random traffic of three flows with back-pressure: the output order and
//    data must match the input, and each flow's output must stay within
//    sigma + m * ceil(t / n) transfers in every window of t cycles.
module multiflow_regulator_tb;
  import flow_reg_pkg::*;
  localparam int DW = 16;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [1:0] tbl_idx = '0;
  table_entry_t tbl_entry = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  flow_id_t in_fid = '0;
  logic [DW-1:0] in_data = '0, out_data;
  logic reconfig, unknown_flow;
  logic [2:0] active;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_reconfig = 0, n_unknown = 0;

  multiflow_regulator #(.DATA_W(DW)) dut (.*);

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

  // scoreboard
  typedef struct packed { flow_id_t f; logic [DW-1:0] d; } item_t;
  item_t q[$];
  int out_t [32][$];
  int last_accept;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_data !== it.d) begin failures++; $display("cycle %0d: data %h, expected %h", cyc, out_data, it.d); end
      out_t[it.f].push_back(cyc);
    end
    if (in_valid && in_ready) begin
      q.push_back('{f: in_fid, d: in_data});
      last_accept = cyc;
    end
    if (reconfig) n_reconfig++;
    if (unknown_flow) n_unknown++;
    cyc <= cyc + 1;
  end

  task automatic write(int idx, int fid, int n, int m, int s);
    @(negedge clk);
    tbl_we = 1; tbl_idx = 2'(idx);
    tbl_entry = '{valid: 1'b1, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    @(negedge clk);
    tbl_we = 0;
  endtask

  // Offer one transfer; return the number of cycles until it was accepted.
  task automatic send(int f, output int wait_cycles);
    @(negedge clk);
    in_valid = 1; in_fid = FID_W'(f); in_data = DW'($urandom);
    wait_cycles = 0;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      wait_cycles++;
      #1;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic envelope(int f, int n, int m, int s);
    for (int i = 0; i < out_t[f].size(); i++)
      for (int j = i; j < out_t[f].size() && j < i + 64; j++) begin
        int len, bound;
        len   = out_t[f][j] - out_t[f][i] + 1;
        bound = s + m * ((len + n - 1) / n);
        checks++;
        if (j - i + 1 > bound) begin
          failures++;
          $display("flow %0d: %0d transfers in %0d cycles", f, j - i + 1, len);
        end
      end
  endtask

  initial begin
    int w, prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    write(0, 3, 5, 1, 1);
    write(1, 7, 1, 1, 4);
    write(2, 9, 4, 2, 2);

    send(3, w);
    expect_($sformatf("first transfer of flow 3 waited %0d cycles, expected 2", w), w == 2);
    for (int k = 0; k < 5; k++) begin
      send(3, w);
      expect_($sformatf("flow 3 at rho=0.2 waited %0d", w), w >= 3 && w <= 5);
    end
    send(7, w);
    expect_($sformatf("first transfer of flow 7 waited %0d", w), w == 2);
    // remaining bank of flow 7: three transfers back to back
    @(negedge clk);
    in_valid = 1; in_fid = 7;
    for (int k = 0; k < 3; k++) begin
      in_data = DW'($urandom);
      #1;
      expect_("flow 7 burst not accepted back to back", in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    send(9, w);
    expect_("first transfer of flow 9", w == 2);
    expect_("three flows active", active == 3'b111);
    // flow 3 is active and its bank has refilled: accepted at once
    repeat (10) @(negedge clk);
    send(3, w);
    expect_($sformatf("active flow 3 waited %0d", w), w == 0);

    // unknown flow 12, then its entry replaces flow 7 (least recently used)
    fork
      send(12, w);
      begin
        repeat (4) @(negedge clk);
        expect_("unknown flow flagged", n_unknown > 0);
        write(1, 12, 2, 1, 1);
      end
    join
    expect_("flow 12 waited for its table entry", w >= 5);
    expect_("flow 12 replaced flow 7 in regulator 1", active == 3'b111 && n_reconfig == 4);
    send(9, w);
    expect_($sformatf("flow 9 still active, waited %0d", w), w == 0 && n_reconfig == 4);
    // flow 9 kept its own parameters: after a refill its bank of two gives
    // two transfers back to back
    repeat (10) @(negedge clk);
    in_valid = 1; in_fid = 9;
    for (int k = 0; k < 2; k++) begin
      in_data = DW'($urandom);
      #1;
      expect_("flow 9 bank of two", in_ready);
      @(negedge clk);
    end
    in_valid = 0;

    // random traffic of flows 3, 9 and 12 with back-pressure
    begin
      int flows[3] = '{3, 9, 12};
      int accepted = 0, stalls = 0;
      @(negedge clk);
      for (int k = 0; k < 3000; k++) begin
        if (!in_valid || in_ready) begin
          in_valid = ($urandom_range(0, 3) != 0);
          in_fid   = FID_W'(flows[$urandom_range(0, 2)]);
          in_data  = DW'($urandom);
        end
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (in_valid && in_ready) accepted++;
        if (in_valid && !in_ready) stalls++;
        @(negedge clk);
        #0;
      end
      in_valid = 0; out_ready = 1;
      repeat (4) @(negedge clk);
      expect_($sformatf("random traffic: %0d accepted, %0d stalls", accepted, stalls),
              accepted > 300 && stalls > 300);
    end
    expect_("scoreboard empty", q.size() == 0);
    expect_("no reload during random traffic", n_reconfig == 4);
    envelope(3, 5, 1, 1);
    envelope(9, 4, 2, 2);
    envelope(12, 2, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
