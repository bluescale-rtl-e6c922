// interface_selector: computes the periodic-resource interface (Pi, Theta)
// of each of the four virtual elements (VEs) of a Scale Element, i.e. the
// period and budget of the server task that serves each local client.
//
// Structure (after the document): a task parameter table fed by a
// round-robin loader from the four local clients, and computation circuits
// made of an FSM (control path) and a data path with an ALU (adders,
// multipliers, comparators and a sequential divider), a fetcher that walks
// the table rows, and a 2 KB scratchpad (256 x 64 bit).
//
// Algorithm, for every VE X with tasks T_X = {(T_i, C_i)} (periods are also
// relative deadlines, tasks scheduled EDF, discrete time):
//   * utilisations u_i = C_i/T_i are held in fixed point with UF fractional
//     bits, rounded up, so U_X and U (all four VEs) are never under-estimated;
//   * Pi is enumerated from 1 to Pi_max = min(min T_i, min T_i / (2(U - U_X)))
//     (the necessary bound on Pi; the min T_i cap is this design's choice and
//     is the only bound when no other VE has tasks);
//   * for each Pi the smallest Theta with Theta/Pi > U_X that passes the test
//     is found by binary search between that bound and Theta = Pi (always
//     schedulable when U_X < 1); a Pi whose lower bound cannot beat the best
//     bandwidth so far is skipped;
//   * the test checks dbf(t) <= sbf(t) only at the points where dbf steps
//     (multiples of some T_i), walking them in increasing order with one
//     "next deadline" per row kept in the scratchpad, and stops once
//     t >= beta = 2 Theta (Pi - Theta) / (Theta - Pi U_X) (evaluated by cross
//     multiplication), beyond which the linear bounds already guarantee it;
//   * sbf(t) = floor(t'/Pi) Theta + max(t' - Pi floor(t'/Pi) - (Pi - Theta), 0)
//     with t' = t - (Pi - Theta), and 0 for t' < 0;
//   * the pair with the smallest Theta/Pi wins (the smaller Pi on a tie).
// A VE without tasks gets (0, 0). A VE without any schedulable pair gets
// (0, 0) and raises its infeasible bit. At the end the sum of the four
// bandwidths (rounded up) is compared with 1 and `overload` is set if it is
// larger: at the root SE this is the check that the memory is not
// over-utilised.
//
// Outputs: each result is written to the local scheduler (ve_valid pulse,
// ve_id, ve_parm = {Theta, Pi}) and then offered to the parent SE as a task
// word {task ID = X, period = Pi, execution time = Theta} on up_valid/up_ready
// (execution time 0 tells the parent to drop the task). A new run starts
// whenever the table has changed since the previous one started.
// Timing: a run takes from a few hundred to many thousands of cycles
// depending on the periods; `busy` is high throughout.
module interface_selector
  import bs_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH = 16,
  parameter int unsigned UF          = 24   // fractional bits of utilisations
) (
  input  logic              clk,
  input  logic              rst_n,
  // parameter path from the local clients
  input  logic [NPORT-1:0]  tp_valid,
  output logic [NPORT-1:0]  tp_ready,
  input  task_parm_t        tp_parm [NPORT],
  // to the local scheduler
  output logic              ve_valid,
  output logic [1:0]        ve_id,
  output ve_parm_t          ve_parm,
  // to the interface selector of the parent SE
  output logic              up_valid,
  input  logic              up_ready,
  output task_parm_t        up_parm,
  // status
  output logic              busy,
  output logic              run_done,
  output logic [NPORT-1:0]  infeasible,
  output logic              overload,
  output logic              table_dropped
);
  localparam int unsigned D   = TABLE_DEPTH;
  localparam int unsigned IW  = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned SPW = 256;            // 2 KB of 64-bit words
  localparam int unsigned RES_BASE = 64;        // results live at 64..67

  typedef logic [127:0] wide_t;
  typedef logic [63:0]  word_t;

  // ---------------------------------------------------------------- table
  task_entry_t      rows [D];
  logic [D-1:0]     row_valid;
  logic             tbl_changed;

  task_param_table #(.DEPTH(D)) u_table (
    .clk      (clk),
    .rst_n    (rst_n),
    .tp_valid (tp_valid),
    .tp_ready (tp_ready),
    .tp_parm  (tp_parm),
    .rows     (rows),
    .row_valid(row_valid),
    .changed  (tbl_changed),
    .dropped  (table_dropped)
  );

  // ----------------------------------------------------------- scratchpad
  word_t scratch [SPW];

  // -------------------------------------------------------------- divider
  logic  div_start, div_busy, div_done;
  word_t div_a, div_b, div_q, div_r;

  seq_divider #(.W(64)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (div_a),
    .divisor  (div_b),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  // ------------------------------------------------------------------ FSM
  typedef enum logic [4:0] {
    S_IDLE, S_U_SCAN, S_U_WAIT, S_X_INIT, S_PIMAX_WAIT, S_PI_START, S_BS_STEP,
    S_TEST_INIT, S_T_FIRST, S_T_CHECK, S_T_SCAN, S_T_SBF, S_T_SBF_WAIT, S_X_DONE,
    S_EMIT, S_UP, S_OVL, S_OVL_WAIT, S_FINISH
  } state_t;

  state_t        state_q;
  logic          dirty_q;
  logic [IW-1:0] i_q;
  logic [1:0]    x_q;
  word_t         ux_q [NPORT];
  word_t         utot_q;
  word_t         mint_q [NPORT];
  logic [IW:0]   cnt_q [NPORT];
  word_t         pimax_q, pi_q, lo_q, hi_q, th_q;
  word_t         best_pi_q, best_th_q;
  logic          best_ok_q;
  word_t         t_q, dbf_q, newmin_q, ovl_sum_q;
  ve_parm_t      res_q [NPORT];
  logic [NPORT-1:0] infeasible_q;
  logic          overload_q;

  // Current row as seen by the fetcher
  task_entry_t cur_row;
  logic        cur_in_x;
  word_t       cur_t, cur_c;
  assign cur_row  = rows[i_q];
  assign cur_in_x = row_valid[i_q] && (cur_row.client_id == x_q);
  assign cur_t    = word_t'(cur_row.p.period);
  assign cur_c    = word_t'(cur_row.p.wcet);

  // ALU: combinational products used by the FSM
  wide_t pi_ux, lo_cand, lhs_beta, rhs_beta, slack, bw_new, bw_best, lo_bw, best_lo_bw;
  always_comb begin
    pi_ux      = wide_t'(pi_q) * wide_t'(ux_q[x_q]);
    lo_cand    = (pi_ux >> UF) + 1;
    slack      = (wide_t'(th_q) << UF) - (wide_t'(pi_q) * wide_t'(ux_q[x_q]));
    lhs_beta   = wide_t'(t_q) * slack;
    rhs_beta   = ((wide_t'(th_q) * wide_t'(word_t'(pi_q - th_q))) << 1) << UF;
    bw_new     = wide_t'(hi_q) * wide_t'(best_pi_q);      // Theta/Pi < best ?
    bw_best    = wide_t'(best_th_q) * wide_t'(pi_q);
    lo_bw      = lo_cand * wide_t'(best_pi_q);            // lower bound vs best
    best_lo_bw = wide_t'(best_th_q) * wide_t'(pi_q);
  end

  word_t sbf_d;         // Pi - Theta
  word_t sbf_val;
  assign sbf_d   = pi_q - th_q;
  assign sbf_val = (div_q * th_q) + ((div_r > sbf_d) ? (div_r - sbf_d) : '0);

  logic last_row;
  assign last_row = (i_q == IW'(D - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      dirty_q      <= 1'b0;
      i_q          <= '0;
      x_q          <= '0;
      utot_q       <= '0;
      pimax_q      <= '0;
      pi_q         <= '0;
      lo_q         <= '0;
      hi_q         <= '0;
      th_q         <= '0;
      best_pi_q    <= '0;
      best_th_q    <= '0;
      best_ok_q    <= 1'b0;
      t_q          <= '0;
      dbf_q        <= '0;
      newmin_q     <= '0;
      ovl_sum_q    <= '0;
      infeasible_q <= '0;
      overload_q   <= 1'b0;
      div_start    <= 1'b0;
      div_a        <= '0;
      div_b        <= '0;
      ve_valid     <= 1'b0;
      run_done     <= 1'b0;
      for (int x = 0; x < NPORT; x++) begin
        ux_q[x]   <= '0;
        mint_q[x] <= '0;
        cnt_q[x]  <= '0;
        res_q[x]  <= '0;
      end
    end else begin
      div_start <= 1'b0;
      ve_valid  <= 1'b0;
      run_done  <= 1'b0;
      if (tbl_changed) dirty_q <= 1'b1;

      unique case (state_q)
        S_IDLE: begin
          if (dirty_q && !tbl_changed) begin
            dirty_q <= 1'b0;
            i_q     <= '0;
            utot_q  <= '0;
            for (int x = 0; x < NPORT; x++) begin
              ux_q[x]   <= '0;
              mint_q[x] <= '1;
              cnt_q[x]  <= '0;
            end
            state_q <= S_U_SCAN;
          end
        end

        // u_i = ceil(C_i * 2^UF / T_i) for every valid row
        S_U_SCAN: begin
          if (row_valid[i_q]) begin
            div_a     <= cur_c << UF;
            div_b     <= cur_t;
            div_start <= 1'b1;
            state_q   <= S_U_WAIT;
          end else if (last_row) begin
            x_q     <= '0;
            state_q <= S_X_INIT;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end

        S_U_WAIT: begin
          if (div_done) begin
            word_t u;
            u = div_q + word_t'(div_r != '0);
            ux_q[cur_row.client_id]   <= ux_q[cur_row.client_id] + u;
            utot_q                    <= utot_q + u;
            cnt_q[cur_row.client_id]  <= cnt_q[cur_row.client_id] + 1'b1;
            if (cur_t < mint_q[cur_row.client_id]) mint_q[cur_row.client_id] <= cur_t;
            if (last_row) begin
              x_q     <= '0;
              state_q <= S_X_INIT;
            end else begin
              i_q     <= i_q + 1'b1;
              state_q <= S_U_SCAN;
            end
          end
        end

        // Pi_max from the necessary condition on Pi
        S_X_INIT: begin
          best_ok_q <= 1'b0;
          best_pi_q <= '0;
          best_th_q <= '0;
          pi_q      <= 64'd1;
          if (cnt_q[x_q] == '0) begin
            state_q <= S_X_DONE;
          end else if (utot_q == ux_q[x_q]) begin
            pimax_q <= mint_q[x_q];
            state_q <= S_PI_START;
          end else begin
            div_a     <= mint_q[x_q] << UF;
            div_b     <= (utot_q - ux_q[x_q]) << 1;
            div_start <= 1'b1;
            state_q   <= S_PIMAX_WAIT;
          end
        end

        S_PIMAX_WAIT: begin
          if (div_done) begin
            pimax_q <= (div_q < mint_q[x_q]) ? div_q : mint_q[x_q];
            state_q <= S_PI_START;
          end
        end

        S_PI_START: begin
          if (pi_q > pimax_q) begin
            state_q <= S_X_DONE;
          end else if (lo_cand > wide_t'(pi_q) ||
                       (best_ok_q && lo_bw >= best_lo_bw)) begin
            pi_q <= pi_q + 1'b1;
          end else begin
            lo_q    <= word_t'(lo_cand);
            hi_q    <= pi_q;
            state_q <= S_BS_STEP;
          end
        end

        S_BS_STEP: begin
          if (lo_q >= hi_q) begin
            if (!best_ok_q || bw_new < bw_best) begin
              best_ok_q <= 1'b1;
              best_pi_q <= pi_q;
              best_th_q <= hi_q;
            end
            pi_q    <= pi_q + 1'b1;
            state_q <= S_PI_START;
          end else begin
            th_q     <= (lo_q + hi_q) >> 1;
            i_q      <= '0;
            newmin_q <= '1;
            dbf_q    <= '0;
            state_q  <= S_TEST_INIT;
          end
        end

        // next deadline of every task of X := T_i
        S_TEST_INIT: begin
          if (cur_in_x) begin
            scratch[8'(i_q)] <= cur_t;
            if (cur_t < newmin_q) newmin_q <= cur_t;
          end
          if (last_row) begin
            state_q <= S_T_FIRST;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end

        S_T_FIRST: begin
          t_q     <= newmin_q;
          state_q <= S_T_CHECK;
        end

        // stop once t >= beta, otherwise scan the deadlines at t
        S_T_CHECK: begin
          i_q      <= '0;
          newmin_q <= '1;
          if (lhs_beta >= rhs_beta) begin
            hi_q    <= th_q;
            state_q <= S_BS_STEP;
          end else begin
            state_q <= S_T_SCAN;
          end
        end

        S_T_SCAN: begin
          if (cur_in_x) begin
            word_t nx;
            nx = scratch[8'(i_q)];
            if (nx == t_q) begin
              dbf_q        <= dbf_q + cur_c;
              scratch[8'(i_q)] <= nx + cur_t;
              if (nx + cur_t < newmin_q) newmin_q <= nx + cur_t;
            end else if (nx < newmin_q) begin
              newmin_q <= nx;
            end
          end
          if (last_row) state_q <= S_T_SBF;
          else          i_q     <= i_q + 1'b1;
        end

        S_T_SBF: begin
          if (t_q < sbf_d) begin
            if (dbf_q != '0) begin
              lo_q    <= th_q + 1'b1;    // failed
              state_q <= S_BS_STEP;
            end else begin
              t_q     <= newmin_q;
              i_q     <= '0;
              state_q <= S_T_CHECK;
            end
          end else begin
            div_a     <= t_q - sbf_d;
            div_b     <= pi_q;
            div_start <= 1'b1;
            state_q   <= S_T_SBF_WAIT;
          end
        end

        S_T_SBF_WAIT: begin
          if (div_done) begin
            if (dbf_q > sbf_val) begin
              lo_q    <= th_q + 1'b1;
              state_q <= S_BS_STEP;
            end else begin
              t_q     <= newmin_q;
              i_q     <= '0;
              state_q <= S_T_CHECK;
            end
          end
        end

        S_X_DONE: begin
          if (best_ok_q) begin
            res_q[x_q]        <= '{theta: best_th_q[VAL_W-1:0], pi: best_pi_q[VAL_W-1:0]};
            infeasible_q[x_q] <= 1'b0;
          end else begin
            res_q[x_q]        <= '0;
            infeasible_q[x_q] <= (cnt_q[x_q] != '0);
          end
          state_q <= S_EMIT;
        end

        S_EMIT: begin
          ve_valid <= 1'b1;
          scratch[8'(RES_BASE) + 8'(x_q)] <= res_q[x_q];
          state_q  <= S_UP;
        end

        S_UP: begin
          if (up_ready) begin
            if (x_q == 2'(NPORT - 1)) begin
              x_q       <= '0;
              ovl_sum_q <= '0;
              state_q   <= S_OVL;
            end else begin
              x_q     <= x_q + 1'b1;
              state_q <= S_X_INIT;
            end
          end
        end

        // sum of ceil(Theta_X * 2^UF / Pi_X) compared with 2^UF
        S_OVL: begin
          if (res_q[x_q].pi != '0) begin
            div_a     <= word_t'(res_q[x_q].theta) << UF;
            div_b     <= word_t'(res_q[x_q].pi);
            div_start <= 1'b1;
            state_q   <= S_OVL_WAIT;
          end else if (x_q == 2'(NPORT - 1)) begin
            state_q <= S_FINISH;
          end else begin
            x_q <= x_q + 1'b1;
          end
        end

        S_OVL_WAIT: begin
          if (div_done) begin
            ovl_sum_q <= ovl_sum_q + div_q + word_t'(div_r != '0);
            if (x_q == 2'(NPORT - 1)) state_q <= S_FINISH;
            else begin
              x_q     <= x_q + 1'b1;
              state_q <= S_OVL;
            end
          end
        end

        S_FINISH: begin
          overload_q <= (ovl_sum_q > (word_t'(1) << UF));
          run_done   <= 1'b1;
          state_q    <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy)
    else $error("interface_selector: divider restarted while busy");

  assign ve_id      = x_q;
  assign ve_parm    = res_q[x_q];
  assign up_valid   = (state_q == S_UP);
  assign up_parm    = '{task_id: 8'(x_q), period: res_q[x_q].pi, wcet: res_q[x_q].theta};
  assign busy       = (state_q != S_IDLE);
  assign infeasible = infeasible_q;
  assign overload   = overload_q;

endmodule
