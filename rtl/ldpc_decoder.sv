// ldpc_decoder: overlapped min-sum decoder for the IEEE 802.11n rate-1/2,
// n = 648 LDPC code (12 x 24 base matrix, 27 x 27 circulants).
//
// Three groups of 27 check node units (cnu) and four groups of 27 variable
// node units (vnu) share one message memory (msg_mem). The control unit
// (ldpc_ctrl) steps through the overlapped schedule: three block rows or
// four block columns per slot and group type, a new iteration every six
// slots, so check node and variable node work of neighbouring iterations
// run at the same time. Because the block rows and columns are taken in an
// order in which every column only needs rows already finished and every
// row only needs columns already finished, the result is exactly that of
// the plain (flooding) min-sum algorithm. After every iteration the parity
// check (parity_check) of the hard decisions decides whether to stop early.
//
// Use: while busy is low, write the 648 channel LLRs (6-bit two's
// complement, positive = bit 0 more likely) one block column of 27 at a
// time with llr_we / llr_blk / llr_in, then pulse start. done pulses when
// the decode ends; hard (bit c*27 + lane of the code word), iterations,
// parity_ok and early_stop are then valid and hold until the next start.
// A decode of I iterations takes (6*I + 2) * SLOT_CLKS + 1 clocks from start.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER  = 20,
  parameter int SLOT_CLKS = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       llr_we,
  input  logic [4:0]                 llr_blk,
  input  logic signed [Z-1:0][W-1:0] llr_in,
  input  logic                       start,
  input  logic                       early_stop_en,
  output logic                       busy,
  output logic                       done,
  output logic [7:0]                 iterations,
  output logic                       early_stop,
  output logic                       parity_ok,   // hard passes the parity check
  output logic                       overlap,     // row and column work in this slot
  output logic [N-1:0]               hard
);
  logic [1:0] row_slot;
  logic [2:0] col_slot;
  logic       row_issue, col_issue;
  logic       syn_ok;
  logic [M-1:0] syndrome;

  logic signed [CG-1:0][Z-1:0][DC-1:0][W-1:0] cnu_q, cnu_r;
  logic        [CG-1:0][DC-1:0]               cnu_mask;
  logic signed [VG-1:0][Z-1:0][DV-1:0][W-1:0] vnu_r, vnu_q;
  logic signed [VG-1:0][Z-1:0][W-1:0]         vnu_llr;
  logic        [VG-1:0][Z-1:0]                vnu_hard;
  logic        [CG-1:0][Z-1:0]                cnu_ov;
  logic        [VG-1:0][Z-1:0]                vnu_ov;

  ldpc_ctrl #(.MAX_ITER(MAX_ITER), .SLOT_CLKS(SLOT_CLKS)) u_ctrl (
    .clk, .rst_n, .start, .early_stop_en, .syn_ok,
    .busy, .done, .early_stop, .iterations,
    .row_slot, .row_issue, .col_slot, .col_issue, .overlap
  );

  msg_mem u_mem (
    .clk,
    .llr_we(llr_we && !busy), .llr_blk, .llr_in,
    .row_slot, .cnu_q, .cnu_mask, .r_we(cnu_ov[0][0]), .cnu_r,
    .col_slot, .vnu_r, .vnu_llr, .q_we(vnu_ov[0][0]), .vnu_q
  );

  for (genvar g = 0; g < CG; g++) begin : g_cnu
    for (genvar z = 0; z < Z; z++) begin : g_z
      cnu u_cnu (
        .clk, .rst_n, .in_valid(row_issue), .mask(cnu_mask[g]),
        .in(cnu_q[g][z]), .out_valid(cnu_ov[g][z]), .out(cnu_r[g][z])
      );
    end
  end

  for (genvar g = 0; g < VG; g++) begin : g_vnu
    for (genvar z = 0; z < Z; z++) begin : g_z
      vnu u_vnu (
        .clk, .rst_n, .in_valid(col_issue), .llr(vnu_llr[g][z]),
        .in(vnu_r[g][z]), .out_valid(vnu_ov[g][z]), .out(vnu_q[g][z]),
        .lq(), .hard(vnu_hard[g][z])
      );
    end
  end

  // Hard-decision register, written by the VNU group that owns each column.
  for (genvar c = 0; c < NB; c++) begin : g_hd
    localparam int CS  = col_slot_of(c);
    localparam int VGI = col_group_of(c);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        hard[c*Z +: Z] <= '0;
      else if (vnu_ov[VGI][0] && col_slot == 3'(CS))
        hard[c*Z +: Z] <= vnu_hard[VGI];
    end
  end

  parity_check u_pc (.hd(hard), .syndrome, .ok(syn_ok));

  assign parity_ok = syn_ok;
endmodule
