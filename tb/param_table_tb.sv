// Testbench of param_table: writes entries, searches for present and absent
// flow IDs, overwrites and invalidates entries, and checks the lowest-index
// rule for duplicate flow IDs, all against a reference copy of the table.
module param_table_tb;
  import flow_reg_pkg::*;
  localparam int NE = 3;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_idx = '0;
  table_entry_t wr_entry = '0;
  flow_id_t rd_fid = '0;
  logic rd_hit;
  reg_params_t rd_params;
  int checks = 0, failures = 0;
  table_entry_t ref_t [NE];

  param_table #(.NUM_ENTRIES(NE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int idx, bit v, int fid, int n, int m, int s);
    @(negedge clk);
    wr_en = 1; wr_idx = 2'(idx);
    wr_entry = '{valid: v, fid: FID_W'(fid), p: '{n: N_W'(n), m: M_W'(m), sigma: SIGMA_W'(s)}};
    @(negedge clk);
    wr_en = 0;
    if (idx < NE) ref_t[idx] = wr_entry;
  endtask

  task automatic check_all();
    for (int f = 0; f < (1 << FID_W); f++) begin
      bit hit = 0;
      reg_params_t p = '0;
      for (int i = 0; i < NE; i++)
        if (!hit && ref_t[i].valid && ref_t[i].fid == FID_W'(f)) begin hit = 1; p = ref_t[i].p; end
      rd_fid = FID_W'(f);
      #1;
      checks++;
      if (rd_hit !== hit || (hit && rd_params !== p)) begin
        failures++;
        $display("fid %0d: hit=%0b params=%h, expected %0b %h", f, rd_hit, rd_params, hit, p);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NE; i++) ref_t[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    write(0, 1, 3, 5, 1, 1);
    write(1, 1, 7, 18, 1, 7);
    write(2, 1, 9, 128, 7, 14);
    check_all();
    write(1, 1, 3, 40, 8, 8);      // duplicate flow ID: entry 0 wins
    check_all();
    write(0, 0, 3, 0, 0, 0);       // invalidate: entry 1 now answers
    check_all();
    write(3, 1, 21, 1, 1, 1);      // index beyond the table: ignored
    check_all();
    for (int k = 0; k < 30; k++) begin
      write($urandom_range(0, NE - 1), 1'($urandom), $urandom_range(0, 31),
            $urandom_range(1, 255), $urandom_range(0, 255), $urandom_range(0, 1023));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
