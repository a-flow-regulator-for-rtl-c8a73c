// Regulation parameter table (the RAM/ROM of the multiflow regulator).
//
// NUM_ENTRIES entries of (flow ID, n, m, sigma), held in registers. Software
// or a configuration master writes an entry through the write port; the
// controller searches the table by flow ID. The search compares all entries
// at once and returns the parameters of the lowest-numbered valid entry whose
// flow ID matches.
//
// Interface: a write (`wr_en`, `wr_idx`, `wr_entry`) takes effect at the next
// rising edge; the search (`rd_fid` -> `rd_hit`, `rd_params`) is
// combinational. After reset all entries are invalid.
//
// From the reference architecture: three entries (f_i, (n_i, m_i, sigma_i)) synthesised
// into registers. Choices of this implementation: the write port, the valid bit and the
// associative search by flow ID.
module param_table
  import flow_reg_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES = 3,
  localparam int unsigned IDX_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  table_entry_t       wr_entry,
  input  flow_id_t           rd_fid,
  output logic               rd_hit,
  output reg_params_t        rd_params
);

  table_entry_t mem_q [NUM_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ENTRIES; i++) mem_q[i] <= '0;
    end else if (wr_en && (32'(wr_idx) < NUM_ENTRIES)) begin
      mem_q[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    rd_hit    = 1'b0;
    rd_params = '0;
    for (int i = NUM_ENTRIES - 1; i >= 0; i--) begin
      if (mem_q[i].valid && (mem_q[i].fid == rd_fid)) begin
        rd_hit    = 1'b1;
        rd_params = mem_q[i].p;
      end
    end
  end

endmodule
