// Testbench of reg_datapath: random grant, input valid and output ready. A
// reference queue checks that transfers are accepted only when granted and
// when the register is free or emptying, leave in order one cycle later at the
// earliest, are held stable under back-pressure, and that `sent` marks each
// departure.
module reg_datapath_tb;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  logic grant = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, full, sent;
  logic [DW-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  int accepted = 0, departed = 0, stalls = 0;
  logic [DW-1:0] q[$];

  reg_datapath #(.DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit exp_ready;
      grant     = ($urandom_range(0, 3) != 0);
      in_valid  = ($urandom_range(0, 1) == 1);
      in_data   = DW'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      exp_ready = grant && (q.size() == 0 || out_ready);
      checks++;
      if (in_ready !== exp_ready || out_valid !== (q.size() != 0) ||
          full !== (q.size() != 0) || sent !== (q.size() != 0 && out_ready)) begin
        failures++;
        $display("cycle %0d: ready=%0b/%0b valid=%0b sent=%0b q=%0d", k, in_ready, exp_ready,
                 out_valid, sent, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (out_data !== q[0]) begin
          failures++;
          $display("cycle %0d: data %h expected %h", k, out_data, q[0]);
        end
        if (!out_ready) stalls++;
      end
      @(posedge clk);
      if (q.size() != 0 && out_ready) begin void'(q.pop_front()); departed++; end
      if (in_valid && exp_ready) begin q.push_back(in_data); accepted++; end
      @(negedge clk);
    end
    checks++;
    if (accepted < 100 || departed < 100 || stalls == 0) begin
      failures++;
      $display("too little traffic: %0d in, %0d out, %0d stalls", accepted, departed, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
