// Flow ID table of the slave-side regulator.
//
// A slave does not send flow IDs, so the slave-side regulator records the
// flow ID of every request that reaches the slave under the request's AXI
// transaction ID, and later uses the transaction ID of the slave's response
// to find the flow the response belongs to. The table has one entry per
// transaction ID (2**ID_W entries), each a valid bit and a flow ID.
//
// Interface: a record (`wr_en`, `wr_id`, `wr_fid`) takes effect at the next
// rising edge; the look-up (`rd_id` -> `rd_valid`, `rd_fid`) is
// combinational. After reset no ID is recorded.
//
// From the reference architecture: recording the flow ID together with the AXI
// transaction ID and retrieving it by that ID. Choices of this implementation: a directly indexed
// table, one flow per transaction ID (requests with the same ID from one
// master are taken to belong to one flow; a later record overwrites).
module flow_id_table
  import flow_reg_pkg::*;
#(
  parameter int unsigned ID_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [ID_W-1:0] wr_id,
  input  flow_id_t        wr_fid,
  input  logic [ID_W-1:0] rd_id,
  output logic            rd_valid,
  output flow_id_t        rd_fid
);

  localparam int unsigned DEPTH = 1 << ID_W;

  logic [DEPTH-1:0] valid_q;
  flow_id_t         fid_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < DEPTH; i++) fid_q[i] <= '0;
    end else if (wr_en) begin
      valid_q[wr_id] <= 1'b1;
      fid_q[wr_id]   <= wr_fid;
    end
  end

  assign rd_valid = valid_q[rd_id];
  assign rd_fid   = fid_q[rd_id];

endmodule
