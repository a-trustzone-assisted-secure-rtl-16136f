// sorted_list: doubly linked list of identifiers kept in ascending order of
// expiration tick, with wrap-around of the tick counter taken into account.
//
// This is the structure behind the task manager's Delay List and the
// software timer service's Timer List. Entry i of the arrays belongs to
// identifier i and holds its expiration value and its previous/next
// pointers. The list is ordered by (value - ref_in) modulo 2^VAL_W, where
// ref_in is the current tick sampled when an insertion starts: an entry that
// expires only after the tick counter wraps (value below the current tick)
// therefore sorts behind every entry that expires before the wrap, so one
// list serves both cases. Entries with equal keys stay in insertion order.
//
// Insertion surveys the list from the head, one entry per clock, until it
// finds an entry with a later expiration or reaches the tail, and links the
// new entry there: it takes 1 + (number of entries passed) cycles, during
// which busy is high. Removal of any entry takes one cycle and is accepted
// only while busy is low. The caller guarantees that an inserted identifier
// is not already in the list and that a removed one is.
//
// Sorting by survey and the single list for both sides of the tick overflow
// follow the design description; the wrap-relative key is this
// implementation's way of ordering "after the overflow" entries last.
module sorted_list #(
  parameter int unsigned N     = 256,
  parameter int unsigned ID_W  = 8,
  parameter int unsigned VAL_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // insertion request (accepted when busy is low)
  input  logic             ins_valid,
  input  logic [ID_W-1:0]  ins_id,
  input  logic [VAL_W-1:0] ins_value,
  input  logic [VAL_W-1:0] ref_in,
  // removal request (accepted when busy is low, not together with ins_valid)
  input  logic             rem_valid,
  input  logic [ID_W-1:0]  rem_id,
  // status
  output logic             busy,
  output logic             empty,
  output logic [ID_W-1:0]  head_id,
  output logic [VAL_W-1:0] head_value
);

  logic [VAL_W-1:0] value_q [N];
  logic [ID_W-1:0]  prev_q  [N];
  logic [ID_W-1:0]  next_q  [N];
  logic [ID_W-1:0]  head_q, tail_q;
  logic             empty_q;

  typedef enum logic {L_IDLE, L_WALK} lstate_e;
  lstate_e          state_q;
  logic [ID_W-1:0]  new_id_q, cur_q;
  logic [VAL_W-1:0] new_key_q, ref_q;

  assign busy       = (state_q != L_IDLE);
  assign empty      = empty_q;
  assign head_id    = head_q;
  assign head_value = value_q[head_q];

  logic [VAL_W-1:0] cur_key;
  assign cur_key = value_q[cur_q] - ref_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        value_q[i] <= '0;
        prev_q[i]  <= '0;
        next_q[i]  <= '0;
      end
      head_q    <= '0;
      tail_q    <= '0;
      empty_q   <= 1'b1;
      state_q   <= L_IDLE;
      new_id_q  <= '0;
      cur_q     <= '0;
      new_key_q <= '0;
      ref_q     <= '0;
    end else begin
      unique case (state_q)
        L_IDLE: begin
          if (ins_valid) begin
            value_q[ins_id] <= ins_value;
            if (empty_q) begin
              head_q  <= ins_id;
              tail_q  <= ins_id;
              empty_q <= 1'b0;
            end else begin
              new_id_q  <= ins_id;
              new_key_q <= ins_value - ref_in;
              ref_q     <= ref_in;
              cur_q     <= head_q;
              state_q   <= L_WALK;
            end
          end else if (rem_valid) begin
            if (head_q == rem_id && tail_q == rem_id) begin
              empty_q <= 1'b1;
            end else if (head_q == rem_id) begin
              head_q <= next_q[rem_id];
            end else if (tail_q == rem_id) begin
              tail_q <= prev_q[rem_id];
            end else begin
              next_q[prev_q[rem_id]] <= next_q[rem_id];
              prev_q[next_q[rem_id]] <= prev_q[rem_id];
            end
          end
        end
        L_WALK: begin
          if (cur_key > new_key_q) begin
            // link the new entry in front of cur
            next_q[new_id_q] <= cur_q;
            prev_q[new_id_q] <= prev_q[cur_q];
            prev_q[cur_q]    <= new_id_q;
            if (cur_q == head_q) head_q <= new_id_q;
            else                 next_q[prev_q[cur_q]] <= new_id_q;
            state_q <= L_IDLE;
          end else if (cur_q == tail_q) begin
            // append at the tail
            next_q[cur_q]    <= new_id_q;
            prev_q[new_id_q] <= cur_q;
            tail_q           <= new_id_q;
            state_q          <= L_IDLE;
          end else begin
            cur_q <= next_q[cur_q];
          end
        end
        default: state_q <= L_IDLE;
      endcase
    end
  end

  // A removal is only legal while no insertion is in progress.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rem_valid |-> !busy && !ins_valid)
    else $error("sorted_list: removal while busy or together with an insertion");

endmodule
