// sample_regs: data reception registers, one per sensor.
//
// Each converted sample from the ADC interface is written into the register
// of its channel and that channel's fresh flag is set. The controller reads
// the registers and clears all fresh flags with a one-clock clear pulse when
// it has taken a complete scan; a sample arriving in the same clock as the
// clear keeps its flag set. all_fresh says that every channel has a new
// sample since the last clear.
// Timing: a sample is visible on code[] one clock after sample_valid.
// The registers follow the design ("stored in suitable registers"); the
// fresh flags are this implementation's way of marking a complete scan.
module sample_regs
  import tim_pkg::*;
#(
  parameter int NUM_CH = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sample_valid,
  input  sample_t              sample,
  input  logic                 clear_fresh,
  output logic [ADC_W-1:0]     code [NUM_CH],
  output logic [NUM_CH-1:0]    fresh,
  output logic                 all_fresh
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_CH; i++) code[i] <= '0;
      fresh <= '0;
    end else begin
      if (clear_fresh) fresh <= '0;
      for (int i = 0; i < NUM_CH; i++) begin
        if (sample_valid && sample.ch == ADC_ADDR_W'(i)) begin
          code[i]  <= sample.code;
          fresh[i] <= 1'b1;
        end
      end
    end
  end

  assign all_fresh = &fresh;

endmodule
