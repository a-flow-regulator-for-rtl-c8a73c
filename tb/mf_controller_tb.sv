// Testbench of mf_controller with the table search and the regulators
// modelled by the testbench. It checks: the two-cycle load of an inactive
// flow (parameters read, then the regulator loaded, transfer routed in the
// cycle after), immediate routing of an active flow with the selected
// regulator's Ready, the choice of free regulators first and then of the
// least recently used one, waiting for a full victim, holding a transfer while
// another regulator still holds one, and the unknown-flow pulse.
module mf_controller_tb;
  import flow_reg_pkg::*;
  localparam int NR = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  flow_id_t in_fid = '0;
  logic tbl_hit;
  reg_params_t tbl_params;
  logic [NR-1:0] reg_valid, reg_ready = '1, reg_full = '0, cfg_load, active;
  reg_params_t cfg_params;
  logic reconfig, unknown_flow;
  int checks = 0, failures = 0;

  mf_controller #(.NUM_REG(NR)) dut (.*);

  // table model: flows 1..20 are known, parameters derived from the flow ID
  always_comb begin
    tbl_hit    = (in_fid >= 1 && in_fid <= 20);
    tbl_params = '{n: N_W'(in_fid + 2), m: M_W'(1), sigma: SIGMA_W'(in_fid)};
  end

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
    if (!cond) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  // Offer a transfer of flow f; expect it to be routed to regulator `r`
  // after `extra` cycles; it is accepted in that cycle.
  task automatic offer(int f, int r, int extra);
    @(negedge clk);
    in_valid = 1; in_fid = FID_W'(f);
    for (int k = 0; k < extra; k++) begin
      #1;
      expect_($sformatf("flow %0d: ready too early (cycle %0d)", f, k), in_ready == 0 && reg_valid == '0);
      if (k == extra - 1) begin
        expect_($sformatf("flow %0d: load of regulator %0d", f, r),
                cfg_load == NR'(1 << r) && reconfig && cfg_params.sigma == SIGMA_W'(f));
      end
      @(negedge clk);
    end
    #1;
    expect_($sformatf("flow %0d: not routed to %0d", f, r), reg_valid == NR'(1 << r) && in_ready);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    expect_("active after reset", active == '0);
    offer(3, 0, 2);                 // free regulators are used first
    offer(7, 1, 2);
    offer(9, 2, 2);
    offer(3, 0, 0);                 // active: routed at once
    expect_("all active", active == 3'b111);
    // LRU order is now 3 (reg 0), 9 (reg 2), 7 (reg 1): flow 12 replaces flow 7
    offer(12, 1, 2);
    offer(12, 1, 0);
    // selected regulator not ready: master sees not ready
    @(negedge clk);
    in_valid = 1; in_fid = 9; reg_ready = 3'b011;
    #1;
    expect_("ready follows the selected regulator", reg_valid == 3'b100 && !in_ready);
    reg_ready = '1;
    // another regulator holds a transfer: hold
    reg_full = 3'b001;
    #1;
    expect_("held while another regulator is full", reg_valid == '0 && !in_ready);
    reg_full = 3'b100;
    #1;
    expect_("own register full does not block", reg_valid == 3'b100 && in_ready);
    @(negedge clk);
    reg_full = '0;
    // LRU is now reg 0 (flow 3); make it full so the load must wait
    in_fid = 15; reg_full = 3'b001;
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      #1;
      expect_("load waits for a full victim", cfg_load == '0 && !in_ready);
      @(negedge clk);
    end
    reg_full = '0;
    #1;
    expect_("load after the victim empties", cfg_load == 3'b001);
    @(negedge clk);
    #1;
    expect_("flow 15 routed to 0", reg_valid == 3'b001 && in_ready);
    // unknown flow
    @(negedge clk);
    in_fid = 25;
    #1;
    expect_("unknown flow flagged", unknown_flow && !in_ready && reg_valid == '0);
    @(negedge clk);
    #1;
    expect_("unknown flow: no load", cfg_load == '0 && unknown_flow);
    in_valid = 0;
    #1;
    expect_("no flag without valid", !unknown_flow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
