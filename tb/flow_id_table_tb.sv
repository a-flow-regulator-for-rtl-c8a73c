// Testbench of flow_id_table: records random (transaction ID, flow ID) pairs
// and checks every look-up against a reference array, including IDs never
// recorded and overwritten IDs.
module flow_id_table_tb;
  import flow_reg_pkg::*;
  localparam int IW = 4;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [IW-1:0] wr_id = '0, rd_id = '0;
  flow_id_t wr_fid = '0, rd_fid;
  logic rd_valid;
  int checks = 0, failures = 0;
  bit ref_v [1 << IW];
  int ref_f [1 << IW];

  flow_id_table #(.ID_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < (1 << IW); i++) begin
      rd_id = IW'(i);
      #1;
      checks++;
      if (rd_valid !== ref_v[i] || (ref_v[i] && int'(rd_fid) != ref_f[i])) begin
        failures++;
        $display("id %0d: valid=%0b fid=%0d, expected %0b %0d", i, rd_valid, rd_fid, ref_v[i], ref_f[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << IW); i++) begin ref_v[i] = 0; ref_f[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 3) != 0);
      wr_id  = IW'($urandom);
      wr_fid = FID_W'($urandom);
      @(negedge clk);
      if (wr_en) begin ref_v[wr_id] = 1; ref_f[wr_id] = int'(wr_fid); end
      wr_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
