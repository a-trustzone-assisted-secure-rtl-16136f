// priority_selector: bit array of ready priorities and highest-set-bit encoder.
//
// Each bit of the array stands for one priority level; the task manager sets
// a bit when the first task of that level becomes ready and clears it when
// the last one leaves. The output is the position of the highest set bit,
// so the highest ready priority is known at all times (bit 60 set and bits
// 61..63 clear gives 60). The 64-bit array and the encoder follow the
// design description; doing it as one combinational priority encoder is this
// implementation's choice. any_out is low, and high_out 0, when no bit is set.
//
// Timing: purely combinational, no clock.
module priority_selector #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]         bits_in,
  output logic [$clog2(WIDTH)-1:0] high_out,
  output logic                     any_out
);

  always_comb begin
    high_out = '0;
    any_out  = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (bits_in[i]) begin
        high_out = ($clog2(WIDTH))'(i);
        any_out  = 1'b1;
      end
    end
  end

endmodule
