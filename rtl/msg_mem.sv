// msg_mem: message memory of the decoder and its routing to the processing
// units.
//
// Storage, one word per edge of the Tanner graph (88 nonzero blocks x 27
// lanes) in each direction, plus the channel values:
//   llr  : channel LLR of every code bit (24 blocks x 27 lanes)
//   q    : variable-to-check message of each edge
//   r    : check-to-variable message of each edge
// Every edge word is stored at its bit lane (the column side of the
// circulant). A check node in lane z of block row r reaches bit lane
// (z + BASE[r][c]) mod 27 of block column c, so the cyclic shift is pure
// wiring on the check node side and no shifter or permutation buffer exists.
//
// Row side: row_slot selects which three block rows (schedule table
// ROW_SCHED) the three CNU groups see; cnu_q[g][z][i] is the q message of
// the i-th edge of check (row, z) and cnu_mask[g] marks the row's edges.
// When r_we is high the CNU results cnu_r are written to the r words of the
// same rows. Column side: col_slot selects four block columns (COL_SCHED);
// vnu_r[g][z][j] is the r message of the j-th edge of bit (col, z), 0 where
// the column has fewer than 12 edges, and vnu_llr the channel value. When
// q_we is high the VNU results vnu_q are written to the q words.
// Loading: llr_we writes one block column of channel values and sets the q
// words of that column to the same values (the min-sum initialisation q = L(c)).
//
// Reads are combinational, writes take effect at the clock edge. The
// organisation of the memory is this design's own: flip-flop words, so all
// edges of a slot are read and written in one clock. The storage has no
// reset; load writes every q word and the schedule writes every r word
// before it is read.
module msg_mem
  import ldpc_pkg::*;
(
  input  logic                                   clk,
  // channel values
  input  logic                                   llr_we,
  input  logic [4:0]                             llr_blk,
  input  logic signed [Z-1:0][W-1:0]             llr_in,
  // check node side
  input  logic [1:0]                             row_slot,
  output logic signed [CG-1:0][Z-1:0][DC-1:0][W-1:0] cnu_q,
  output logic [CG-1:0][DC-1:0]                  cnu_mask,
  input  logic                                   r_we,
  input  logic signed [CG-1:0][Z-1:0][DC-1:0][W-1:0] cnu_r,
  // variable node side
  input  logic [2:0]                             col_slot,
  output logic signed [VG-1:0][Z-1:0][DV-1:0][W-1:0] vnu_r,
  output logic signed [VG-1:0][Z-1:0][W-1:0]     vnu_llr,
  input  logic                                   q_we,
  input  logic signed [VG-1:0][Z-1:0][DV-1:0][W-1:0] vnu_q
);
  // ---------------------------------------------------------------- storage
  logic signed [Z-1:0][W-1:0] llr_mem [NB];

  always_ff @(posedge clk)
    if (llr_we) llr_mem[llr_blk] <= llr_in;

  for (genvar r = 0; r < MB; r++) begin : g_r
    for (genvar c = 0; c < NB; c++) begin : g_c
      if (base_at(r, c) >= 0) begin : g_e
        localparam int S  = base_at(r, c);
        localparam int RS = row_slot_of(r);
        localparam int RG = row_group_of(r);
        localparam int PI = pos_in_row(r, c);
        localparam int CS = col_slot_of(c);
        localparam int VGI = col_group_of(c);
        localparam int PJ = pos_in_col(r, c);

        logic signed [Z-1:0][W-1:0] q;   // indexed by bit lane
        logic signed [Z-1:0][W-1:0] rm;  // indexed by bit lane

        always_ff @(posedge clk) begin
          if (llr_we && llr_blk == 5'(c))
            q <= llr_in;
          else if (q_we && col_slot == 3'(CS))
            for (int z = 0; z < Z; z++) q[z] <= vnu_q[VGI][z][PJ];
        end

        always_ff @(posedge clk) begin
          if (r_we && row_slot == 2'(RS))
            for (int z = 0; z < Z; z++) rm[(z + S) % Z] <= cnu_r[RG][z][PI];
        end
      end
    end
  end

  // ----------------------------------------------------------- row routing
  for (genvar g = 0; g < CG; g++) begin : g_cg
    for (genvar i = 0; i < DC; i++) begin : g_ci
      logic signed [Z-1:0][W-1:0] opt [ROW_SLOTS];
      logic [ROW_SLOTS-1:0]       has;
      for (genvar s = 0; s < ROW_SLOTS; s++) begin : g_s
        localparam int R = row_sched_at(s, g);
        localparam int C = row_col(R, i);
        if (C >= 0) begin : g_on
          localparam int S = base_at(R, C);
          for (genvar z = 0; z < Z; z++) begin : g_z
            assign opt[s][z] = g_r[R].g_c[C].g_e.q[(z + S) % Z];
          end
          assign has[s] = 1'b1;
        end else begin : g_off
          assign opt[s] = '0;
          assign has[s] = 1'b0;
        end
      end
      for (genvar z = 0; z < Z; z++) begin : g_z
        assign cnu_q[g][z][i] = opt[row_slot][z];
      end
      assign cnu_mask[g][i] = has[row_slot];
    end
  end

  // -------------------------------------------------------- column routing
  for (genvar g = 0; g < VG; g++) begin : g_vg
    logic signed [Z-1:0][W-1:0] lopt [COL_SLOTS];
    for (genvar s = 0; s < COL_SLOTS; s++) begin : g_ls
      assign lopt[s] = llr_mem[col_sched_at(s, g)];
    end
    for (genvar z = 0; z < Z; z++) begin : g_lz
      assign vnu_llr[g][z] = (col_slot < 3'(COL_SLOTS)) ? lopt[col_slot][z] : '0;
    end
    for (genvar j = 0; j < DV; j++) begin : g_vj
      logic signed [Z-1:0][W-1:0] opt [COL_SLOTS];
      for (genvar s = 0; s < COL_SLOTS; s++) begin : g_s
        localparam int C = col_sched_at(s, g);
        localparam int R = col_row(C, j);
        if (R >= 0) begin : g_on
          assign opt[s] = g_r[R].g_c[C].g_e.rm;
        end else begin : g_off
          assign opt[s] = '0;
        end
      end
      for (genvar z = 0; z < Z; z++) begin : g_z
        assign vnu_r[g][z][j] = (col_slot < 3'(COL_SLOTS)) ? opt[col_slot][z] : '0;
      end
    end
  end
endmodule
