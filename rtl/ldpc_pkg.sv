// ldpc_pkg: constants shared by the overlapped min-sum LDPC decoder.
//
// The code is the IEEE 802.11n rate-1/2, n = 648 LDPC code: a 12 x 24 base
// matrix of Z = 27 circulants. A base entry s >= 0 is the 27x27 identity
// cyclically shifted by s (check lane z connects to bit lane (z + s) mod 27);
// -1 is the all-zero block. Messages are W = 6-bit two's complement numbers,
// the word length the decoder is specified with.
//
// The decoder runs the rows and columns of the base matrix in the overlapped
// order of the "maximum overlapping" schedule: three block rows per slot on
// 3 x 27 check node units and four block columns per slot on 4 x 27 variable
// node units, a new iteration every six slots, with the column processing of
// one iteration running in parallel with the row processing of the next.
// Row and column numbers in the schedule tables are the original (0-based)
// base-matrix indices; the matrix is never physically re-ordered, only
// processed in this order, so no input or output permutation buffers exist.
//
// Edge tables (which columns a row touches, which rows a column touches,
// the index of each nonzero block) are derived from BASE by the constant
// functions below, in row-major order of the nonzero blocks.
package ldpc_pkg;

  localparam int Z  = 27;          // circulant size
  localparam int MB = 12;          // block rows
  localparam int NB = 24;          // block columns
  localparam int N  = NB * Z;      // code length, 648
  localparam int M  = MB * Z;      // parity checks, 324
  localparam int W  = 6;           // message word length
  localparam int MW = W - 1;       // magnitude width
  localparam int DC = 8;           // maximum row degree (check node inputs)
  localparam int DV = 12;          // maximum column degree (variable node inputs)
  localparam int SW = W + 4;       // width of the variable node sum (13 terms)

  localparam logic signed [W-1:0] MSG_MAX = (1 <<< (W - 1)) - 1;   //  31
  localparam logic signed [W-1:0] MSG_MIN = -MSG_MAX;              // -31

  // IEEE 802.11n, rate 1/2, Z = 27 base matrix (-1 marks a zero block).
  localparam int BASE [MB][NB] = '{
    '{ 0, -1, -1, -1,  0,  0, -1, -1,  0, -1, -1,  0,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{22,  0, -1, -1, 17, -1,  0,  0, 12, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 6, -1,  0, -1, 10, -1, -1, -1, 24, -1,  0, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 2, -1, -1,  0, 20, -1, -1, -1, 25,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{23, -1, -1, -1,  3, -1, -1, -1,  0, -1,  9, 11, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{24, -1, 23,  1, 17, -1,  3, -1, 10, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{25, -1, -1, -1,  8, -1, -1, -1,  7, 18, -1, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{13, 24, -1, -1,  0, -1,  8, -1,  6, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{ 7, 20, -1, 16, 22, 10, -1, -1, 23, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{11, -1, -1, -1, 19, -1, -1, -1, 13, -1,  3, 17, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{25, -1,  8, -1, 23, 18, -1, 14,  9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{ 3, -1, -1, -1, 16, -1, -1,  2, 25,  5, -1, -1,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Overlapped schedule (3 CNU groups : 4 VNU groups).
  localparam int CG = 3;           // CNU groups, each Z check node units
  localparam int VG = 4;           // VNU groups, each Z variable node units
  localparam int ROW_SLOTS = 4;    // row slots per iteration
  localparam int COL_SLOTS = 6;    // column slots per iteration
  localparam int PERIOD    = 6;    // slots between the starts of two iterations
  localparam int COL_LAG   = 2;    // column slots start this many slots after rows

  localparam int ROW_SCHED [ROW_SLOTS][CG] = '{
    '{2, 4, 5}, '{3, 0, 1}, '{6, 7, 8}, '{9, 10, 11}
  };
  localparam int COL_SCHED [COL_SLOTS][VG] = '{
    '{15, 16, 13, 14}, '{17, 18,  6, 19}, '{ 1,  3, 10, 11},
    '{ 0,  2,  4,  8}, '{ 9,  5, 12,  7}, '{20, 21, 22, 23}
  };

  // Table accessors usable in constant (elaboration-time) expressions.
  function automatic int base_at(int r, int c);
    return BASE[r][c];
  endfunction
  function automatic int row_sched_at(int s, int g);
    return ROW_SCHED[s][g];
  endfunction
  function automatic int col_sched_at(int s, int g);
    return COL_SCHED[s][g];
  endfunction

  // Number of nonzero blocks (edges of the base graph).
  function automatic int num_edges();
    int n = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (BASE[r][c] >= 0) n++;
    return n;
  endfunction

  localparam int NE = num_edges();   // 88

  // Row-major index of the nonzero block (r, c); -1 if the block is zero.
  function automatic int edge_id(int r, int c);
    int n = 0;
    if (BASE[r][c] < 0) return -1;
    for (int rr = 0; rr < MB; rr++)
      for (int cc = 0; cc < NB; cc++) begin
        if (rr == r && cc == c) return n;
        if (BASE[rr][cc] >= 0) n++;
      end
    return -1;
  endfunction

  // Column of the i-th nonzero block of row r; -1 past the row degree.
  function automatic int row_col(int r, int i);
    int n = 0;
    for (int c = 0; c < NB; c++)
      if (BASE[r][c] >= 0) begin
        if (n == i) return c;
        n++;
      end
    return -1;
  endfunction

  // Row of the j-th nonzero block of column c; -1 past the column degree.
  function automatic int col_row(int c, int j);
    int n = 0;
    for (int r = 0; r < MB; r++)
      if (BASE[r][c] >= 0) begin
        if (n == j) return r;
        n++;
      end
    return -1;
  endfunction

  // Position i of column c among the nonzero blocks of row r.
  function automatic int pos_in_row(int r, int c);
    int n = 0;
    for (int cc = 0; cc < c; cc++)
      if (BASE[r][cc] >= 0) n++;
    return n;
  endfunction

  // Position j of row r among the nonzero blocks of column c.
  function automatic int pos_in_col(int r, int c);
    int n = 0;
    for (int rr = 0; rr < r; rr++)
      if (BASE[rr][c] >= 0) n++;
    return n;
  endfunction

  // Row slot and CNU group that process block row r.
  function automatic int row_slot_of(int r);
    for (int s = 0; s < ROW_SLOTS; s++)
      for (int g = 0; g < CG; g++)
        if (ROW_SCHED[s][g] == r) return s;
    return -1;
  endfunction
  function automatic int row_group_of(int r);
    for (int s = 0; s < ROW_SLOTS; s++)
      for (int g = 0; g < CG; g++)
        if (ROW_SCHED[s][g] == r) return g;
    return -1;
  endfunction

  // Column slot and VNU group that process block column c.
  function automatic int col_slot_of(int c);
    for (int s = 0; s < COL_SLOTS; s++)
      for (int g = 0; g < VG; g++)
        if (COL_SCHED[s][g] == c) return s;
    return -1;
  endfunction
  function automatic int col_group_of(int c);
    for (int s = 0; s < COL_SLOTS; s++)
      for (int g = 0; g < VG; g++)
        if (COL_SCHED[s][g] == c) return g;
    return -1;
  endfunction

  // Saturate a wide signed value to the symmetric message range [-31, 31].
  function automatic logic signed [W-1:0] sat_msg(logic signed [SW:0] v);
    if (int'(v) > int'(MSG_MAX)) return MSG_MAX;
    if (int'(v) < int'(MSG_MIN)) return MSG_MIN;
    return v[W-1:0];
  endfunction

endpackage
