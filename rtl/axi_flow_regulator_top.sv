// AXI flow regulation: master-side W regulator and slave-side R regulator.
//
// The two regulators that sit on the AXI ports of a system-on-chip: a
// master-side multiflow regulator on the write-data (W) channel, between a
// master and the interconnect, and a slave-side multiflow regulator on the
// read-data (R) channel, between the interconnect and a slave. Each shapes
// every flow to its own (sigma, rho) envelope: at most sigma transfers back
// to back, m transfers every n cycles on average. The master adds a flow ID
// to its W channel; the slave side recovers the flow ID from the AXI ID of
// each response. Each side has its own three-entry parameter table.
//
// Interface: the master W channel (s_w*, with s_wfid) and the regulated W
// channel (m_w*); the AR handshake observed at the slave (ar_*), the slave's
// R channel (s_r*) and the regulated R channel (m_r*); a table write port per
// side; status pulses per side. All AXI channels use valid/ready handshakes.
//
// From the reference architecture: a regulator per channel where needed, the multiflow
// W regulator with its flow ID, and the slave regulator's ID-to-flow table.
// Choices of this implementation: the pairing of the two regulators in one top and the widths.
module axi_flow_regulator_top
  import flow_reg_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned ID_W        = 4,
  parameter int unsigned NUM_REG     = 3,
  parameter int unsigned NUM_ENTRIES = 3,
  localparam int unsigned IDX_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // master-side parameter table
  input  logic                w_tbl_we,
  input  logic [IDX_W-1:0]    w_tbl_idx,
  input  table_entry_t        w_tbl_entry,
  // W channel from the master
  input  logic                s_wvalid,
  output logic                s_wready,
  input  flow_id_t            s_wfid,
  input  logic [DATA_W-1:0]   s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic                s_wlast,
  // regulated W channel to the interconnect
  output logic                m_wvalid,
  input  logic                m_wready,
  output logic [DATA_W-1:0]   m_wdata,
  output logic [DATA_W/8-1:0] m_wstrb,
  output logic                m_wlast,
  output logic                w_reconfig,
  output logic                w_unknown_flow,
  output logic [NUM_REG-1:0]  w_active,
  // slave-side parameter table
  input  logic                r_tbl_we,
  input  logic [IDX_W-1:0]    r_tbl_idx,
  input  table_entry_t        r_tbl_entry,
  // AR handshake at the slave
  input  logic                ar_valid,
  input  logic                ar_ready,
  input  logic [ID_W-1:0]     ar_id,
  input  flow_id_t            ar_fid,
  // R channel from the slave
  input  logic                s_rvalid,
  output logic                s_rready,
  input  logic [ID_W-1:0]     s_rid,
  input  logic [DATA_W-1:0]   s_rdata,
  input  logic [1:0]          s_rresp,
  input  logic                s_rlast,
  // regulated R channel to the interconnect
  output logic                m_rvalid,
  input  logic                m_rready,
  output logic [ID_W-1:0]     m_rid,
  output logic [DATA_W-1:0]   m_rdata,
  output logic [1:0]          m_rresp,
  output logic                m_rlast,
  output logic                r_reconfig,
  output logic                r_unknown_flow,
  output logic [NUM_REG-1:0]  r_active
);

  localparam int unsigned W_PAY_W = DATA_W + DATA_W/8 + 1;

  multiflow_regulator #(
    .DATA_W(W_PAY_W), .NUM_REG(NUM_REG), .NUM_ENTRIES(NUM_ENTRIES)
  ) u_w_reg (
    .clk, .rst_n,
    .tbl_we    (w_tbl_we),
    .tbl_idx   (w_tbl_idx),
    .tbl_entry (w_tbl_entry),
    .in_valid  (s_wvalid),
    .in_ready  (s_wready),
    .in_fid    (s_wfid),
    .in_data   ({s_wdata, s_wstrb, s_wlast}),
    .out_valid (m_wvalid),
    .out_ready (m_wready),
    .out_data  ({m_wdata, m_wstrb, m_wlast}),
    .reconfig     (w_reconfig),
    .unknown_flow (w_unknown_flow),
    .active       (w_active)
  );

  axi_slave_regulator #(
    .DATA_W(DATA_W), .ID_W(ID_W), .NUM_REG(NUM_REG), .NUM_ENTRIES(NUM_ENTRIES)
  ) u_r_reg (
    .clk, .rst_n,
    .tbl_we    (r_tbl_we),
    .tbl_idx   (r_tbl_idx),
    .tbl_entry (r_tbl_entry),
    .ar_valid, .ar_ready, .ar_id, .ar_fid,
    .s_rvalid, .s_rready, .s_rid, .s_rdata, .s_rresp, .s_rlast,
    .m_rvalid, .m_rready, .m_rid, .m_rdata, .m_rresp, .m_rlast,
    .reconfig     (r_reconfig),
    .unknown_flow (r_unknown_flow),
    .active       (r_active)
  );

endmodule
