// partitioned_buffer: out-of-order buffer (IQ or a physical register file)
// split into NPART equal partitions.
//
// Each entry has a valid bit.  Allocation picks the lowest-numbered free
// entries, up to W per cycle, among the first alloc_parts partitions only; the
// resizing controller narrows alloc_parts by one partition while it drains the
// last one.  Entries are released by index in any order (W release ports).
// The payload is written and read by index through W write and W read ports
// (for a register file: writeback and operand read; for an issue queue: the
// instruction written into the slot it was given).  part_empty says which
// partitions hold no valid entry, so the controller can switch them off.
//
// Timing: alloc_grant, alloc_idx and stall are combinational from the valid
// bits and the request; valid bits, payload and occupancy update at the clock
// edge.  Reads are combinational.  An entry released in a cycle can be
// allocated again from the next cycle on.
module partitioned_buffer #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned NPART   = 4,
  parameter int unsigned W       = 8,
  parameter int unsigned DW      = 32,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned OCC_W  = $clog2(ENTRIES + 1),
  localparam int unsigned PART_W = $clog2(NPART + 1),
  localparam int unsigned CNT_W  = $clog2(W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PART_W-1:0] alloc_parts,
  input  logic [CNT_W-1:0]  alloc_cnt,
  output logic [CNT_W-1:0]  alloc_grant,
  output logic [IDX_W-1:0]  alloc_idx [W],
  output logic              stall,
  input  logic [W-1:0]      rel_valid,
  input  logic [IDX_W-1:0]  rel_idx [W],
  input  logic [W-1:0]      wr_en,
  input  logic [IDX_W-1:0]  wr_idx [W],
  input  logic [DW-1:0]     wr_data [W],
  input  logic [IDX_W-1:0]  rd_idx [W],
  output logic [DW-1:0]     rd_data [W],
  output logic [OCC_W-1:0]  occupancy,
  output logic [NPART-1:0]  part_empty
);
  localparam int unsigned PSIZE = ENTRIES / NPART;

  logic [ENTRIES-1:0] valid;
  logic [DW-1:0]      mem [ENTRIES];
  logic [OCC_W-1:0]   limit;

  assign limit = OCC_W'(alloc_parts) * OCC_W'(PSIZE);

  // Pick the first free entries below the allocation limit.
  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < W; i++) alloc_idx[i] = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (OCC_W'(e) < limit && !valid[e] && n < int'(alloc_cnt) && n < W) begin
        alloc_idx[n] = IDX_W'(e);
        n++;
      end
    end
    alloc_grant = CNT_W'(n);
    stall       = n < int'(alloc_cnt);
  end

  always_comb begin
    for (int p = 0; p < NPART; p++)
      part_empty[p] = ~|valid[p*PSIZE +: PSIZE];
  end

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy = occupancy + OCC_W'(valid[e]);
  end

  always_comb begin
    for (int i = 0; i < W; i++) rd_data[i] = mem[rd_idx[i]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      for (int i = 0; i < W; i++)
        if (rel_valid[i]) valid[rel_idx[i]] <= 1'b0;
      for (int i = 0; i < W; i++)
        if (CNT_W'(i) < alloc_grant) valid[alloc_idx[i]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++)
      if (wr_en[i]) mem[wr_idx[i]] <= wr_data[i];
  end

  generate
    for (genvar i = 0; i < W; i++) begin : g_chk
      a_rel_live: assert property (@(posedge clk) disable iff (!rst_n)
                                   rel_valid[i] |-> valid[rel_idx[i]]);
    end
  endgenerate
  initial begin
    assert (ENTRIES % NPART == 0) else $error("ENTRIES must divide into NPART partitions");
  end
endmodule
