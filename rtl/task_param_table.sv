// task_param_table: the task parameter table of an interface selector,
// together with its round-robin loader.
//
// Each local client delivers task parameters as a 72-bit word {task ID (8),
// period (32), execution time (32)} on a valid/ready port. The loader serves
// the four ports in round-robin order, one word per cycle, and prefixes the
// 2-bit client ID, giving the 74-bit table row of the document. DEPTH rows of
// registers hold the rows with a valid bit each.
//
// Update rule (this design's choice, so that a task can join, change or
// leave): a word whose (client ID, task ID) is already in the table
// overwrites that row, or deletes it when its period or execution time is 0;
// a new task goes into the lowest free row. A new task that finds the table
// full is dropped and raises the sticky `dropped` flag.
// `changed` pulses for one cycle after every edge that altered the table.
// All rows are visible in parallel to the computation circuits.
module task_param_table
  import bs_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORT-1:0]  tp_valid,
  output logic [NPORT-1:0]  tp_ready,
  input  task_parm_t        tp_parm [NPORT],
  output task_entry_t       rows [DEPTH],
  output logic [DEPTH-1:0]  row_valid,
  output logic              changed,
  output logic              dropped
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // Round-robin loader
  logic [1:0] rr_q;      // client with the highest priority this cycle
  logic [1:0] pick;
  logic       pick_valid;
  always_comb begin
    pick       = rr_q;
    pick_valid = 1'b0;
    for (int k = NPORT - 1; k >= 0; k--) begin
      logic [1:0] c;
      c = rr_q + 2'(k);
      if (tp_valid[c]) begin
        pick       = c;
        pick_valid = 1'b1;
      end
    end
  end

  always_comb begin
    tp_ready = '0;
    if (pick_valid) tp_ready[pick] = 1'b1;
  end

  task_entry_t new_row;
  assign new_row = '{client_id: pick, p: tp_parm[pick]};

  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          has_free;
  logic [IW-1:0] free_idx;
  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (row_valid[i] && rows[i].client_id == new_row.client_id &&
          rows[i].p.task_id == new_row.p.task_id) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
      if (!row_valid[i]) begin
        has_free = 1'b1;
        free_idx = IW'(i);
      end
    end
  end

  logic is_delete;
  assign is_delete = (new_row.p.period == '0) || (new_row.p.wcet == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q      <= '0;
      row_valid <= '0;
      changed   <= 1'b0;
      dropped   <= 1'b0;
    end else begin
      changed <= 1'b0;
      if (pick_valid) begin
        rr_q <= pick + 1'b1;
        if (hit) begin
          changed <= 1'b1;
          if (is_delete) row_valid[hit_idx] <= 1'b0;
        end else if (!is_delete) begin
          if (has_free) begin
            row_valid[free_idx] <= 1'b1;
            changed             <= 1'b1;
          end else begin
            dropped <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pick_valid && !is_delete) begin
      if (hit)           rows[hit_idx]  <= new_row;
      else if (has_free) rows[free_idx] <= new_row;
    end
  end

endmodule
