// cmd_ring: circular command buffer with several write ports and one read port.
//
// The hardware RTOS services must accept a command whenever it arrives, even
// while an earlier list operation is still walking a list; commands are kept
// here in arrival order until the service's controller takes them. All
// write ports may push in the same cycle; they are stored in port order
// (port 0 first). A push into a full buffer is dropped and reported on
// overflow_out for one cycle. A pop (rd_en while not empty) frees the entry
// shown on rd_data, which is the oldest one. The circular buffer is part of
// the task manager's description; its depth, port count and the drop policy
// are this implementation's choices.
//
// Timing: a pushed entry is visible on rd_data the next cycle.
module cmd_ring #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NWR   = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NWR-1:0] wr_en,
  input  T               wr_data [NWR],
  input  logic           rd_en,
  output T               rd_data,
  output logic           empty,
  output logic           overflow_out
);

  localparam int unsigned PW = $clog2(DEPTH);

  T                mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  assign empty   = (count == 0);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr       <= '0;
      wr_ptr       <= '0;
      count        <= '0;
      overflow_out <= 1'b0;
    end else begin
      logic [PW-1:0] wp;
      logic [PW:0]   cnt;
      logic          ovf;
      wp  = wr_ptr;
      cnt = count;
      ovf = 1'b0;
      if (rd_en && count != 0) begin
        rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
        cnt    = cnt - 1'b1;
      end
      for (int unsigned p = 0; p < NWR; p++) begin
        if (wr_en[p]) begin
          if (cnt < (PW+1)'(DEPTH)) begin
            mem[wp] <= wr_data[p];
            wp  = (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
            cnt = cnt + 1'b1;
          end else begin
            ovf = 1'b1;
          end
        end
      end
      wr_ptr       <= wp;
      count        <= cnt;
      overflow_out <= ovf;
    end
  end

endmodule
