// Data path and flow monitor of the (sigma, rho) regulator.
//
// The data path is a one-transfer register R between the unregulated input
// and the regulated output. The control path grants admission (`grant`, a
// token is free); R then takes a transfer when it is empty or its current
// transfer leaves in the same cycle. The flow monitor watches the output and
// pulses `sent` for every transfer that leaves R, which removes one token from
// the token bank.
//
// Interface: valid/ready handshakes on both sides (a transfer moves when valid
// and ready are both high at a rising clock edge). `in_ready` depends
// combinationally on `grant` and `out_ready`; `out_valid` and `out_data` are
// registered, so a transfer appears at the output one cycle after it is
// accepted.
//
// From the reference architecture: a register in the flow gated by the Ready signal and a
// monitor on the outgoing flow. Choices of this implementation: the valid/ready register with
// downstream back-pressure, and taking the monitor event at the output
// handshake.
module reg_datapath #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              grant,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              full,
  output logic              sent
);

  logic              full_q;
  logic [DATA_W-1:0] data_q;

  assign sent     = full_q && out_ready;
  assign in_ready = grant && (!full_q || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      data_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full_q <= 1'b1;
        data_q <= in_data;
      end else if (sent) begin
        full_q <= 1'b0;
      end
    end
  end

  assign out_valid = full_q;
  assign out_data  = data_q;
  assign full      = full_q;

endmodule
