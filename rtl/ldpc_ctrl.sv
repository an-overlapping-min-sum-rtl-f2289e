// ldpc_ctrl: control unit of the overlapped decoder.
//
// Time is divided into slots of SLOT_CLKS clocks. In each slot the three CNU
// groups may process one row slot of the schedule (three block rows) and the
// four VNU groups one column slot (four block columns). Iteration k uses row
// slots 6k .. 6k+3 and column slots 6k+2 .. 6k+7, so the columns of
// iteration k overlap the last two row slots of iteration k and the first
// two of iteration k+1: a decode of I iterations takes 6*I + 2 slots
// instead of the 10*I of a row-then-column order.
//
// Each active slot issues one operation (row_issue / col_issue, a one-clock
// pulse in the first clock of the slot) while row_slot / col_slot are held
// for the whole slot, so the processing units (latency 2) write their
// results back in the last clock of the same slot and the next slot already
// reads them. SLOT_CLKS = 3 is the shortest slot that allows this.
//
// After the last column slot of an iteration, the first clock of the next
// slot looks at syn_ok (the parity check of the hard decisions just
// written). The decode stops there when the parity check passes
// (early_stop_en) or MAX_ITER iterations are done; done pulses for one
// clock, iterations holds the number of iterations run and early_stop tells
// which of the two ended it. start is accepted while not busy.
// The slot length, the stop rule and the handshake are this design's own;
// the slot order and the 20-iteration limit follow the published design.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER  = 20,
  parameter int SLOT_CLKS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       early_stop_en,
  input  logic       syn_ok,
  output logic       busy,
  output logic       done,
  output logic       early_stop,
  output logic [7:0] iterations,
  output logic [1:0] row_slot,
  output logic       row_issue,
  output logic [2:0] col_slot,     // COL_SLOTS when no column slot is active
  output logic       col_issue,
  output logic       overlap       // rows and columns active in this slot
);
  logic [$clog2(SLOT_CLKS)-1:0] phase;
  logic [2:0] row_grp, col_grp;
  logic [7:0] row_iter, col_iter;
  logic [1:0] lag;
  logic       check_pending;
  logic       row_act, col_act, last_clk, stop;

  assign row_act  = busy && row_grp < 3'(ROW_SLOTS) && row_iter < 8'(MAX_ITER);
  assign col_act  = busy && lag == 2'd0 && col_iter < 8'(MAX_ITER);
  assign last_clk = int'(phase) == SLOT_CLKS - 1;
  assign stop     = busy && phase == 0 && check_pending &&
                    ((early_stop_en && syn_ok) || iterations == 8'(MAX_ITER));

  assign row_slot  = row_grp[1:0];
  assign col_slot  = col_act ? col_grp : 3'(COL_SLOTS);
  assign row_issue = row_act && phase == 0 && !stop;
  assign col_issue = col_act && phase == 0 && !stop;
  assign overlap   = row_act && col_act && !stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      early_stop    <= 1'b0;
      iterations    <= '0;
      phase         <= '0;
      row_grp       <= '0;
      col_grp       <= '0;
      row_iter      <= '0;
      col_iter      <= '0;
      lag           <= '0;
      check_pending <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy          <= 1'b1;
          early_stop    <= 1'b0;
          iterations    <= '0;
          phase         <= '0;
          row_grp       <= '0;
          col_grp       <= '0;
          row_iter      <= '0;
          col_iter      <= '0;
          lag           <= 2'(COL_LAG);
          check_pending <= 1'b0;
        end
      end else if (stop) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        early_stop <= syn_ok && early_stop_en;
      end else begin
        if (phase == 0) check_pending <= 1'b0;
        if (!last_clk) begin
          phase <= phase + 1'b1;
        end else begin
          phase <= '0;
          // advance the row sequence
          if (row_grp == 3'(PERIOD - 1)) begin
            row_grp  <= '0;
            row_iter <= row_iter + 1'b1;
          end else begin
            row_grp <= row_grp + 1'b1;
          end
          // advance the column sequence
          if (lag != 2'd0) begin
            lag <= lag - 1'b1;
          end else if (col_grp == 3'(COL_SLOTS - 1)) begin
            col_grp       <= '0;
            col_iter      <= col_iter + 1'b1;
            iterations    <= col_iter + 1'b1;
            check_pending <= 1'b1;
          end else begin
            col_grp <= col_grp + 1'b1;
          end
        end
      end
    end
  end

  // The processing units need two clocks to return their results.
  initial assert (SLOT_CLKS >= 3) else $error("SLOT_CLKS must be at least 3");
  initial assert (MAX_ITER >= 1 && MAX_ITER < 256) else $error("MAX_ITER out of range");
endmodule
