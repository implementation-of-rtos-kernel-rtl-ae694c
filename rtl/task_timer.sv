// task_timer: one task's period timer with its shadow register.
//
// The shadow register holds the task's period in clock cycles; 0 means the
// task is not periodic and the timer is idle. Writing cfg_period loads both
// the shadow register and the counter. The counter counts down once per
// clock; when it would reach zero (count == 1) the timer has run out: it
// raises timeout for one cycle and reloads from the shadow register, so a
// period of P gives one pulse every P cycles.
//
// Timer, shadow register, count-down and reload on time-out are as the
// kernel is described; the width, counting every clock and the write port
// used to set the period are this design's choices.
module task_timer #(
  parameter int unsigned TIMER_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cfg_we,
  input  logic [TIMER_W-1:0] cfg_period,
  output logic               timeout,
  output logic [TIMER_W-1:0] count
);
  logic [TIMER_W-1:0] shadow;

  always_ff @(posedge clk) begin
    if (rst) begin
      shadow <= '0;
      count  <= '0;
    end else if (cfg_we) begin
      shadow <= cfg_period;
      count  <= cfg_period;
    end else if (shadow != '0) begin
      if (count <= 1) count <= shadow;
      else            count <= count - 1'b1;
    end
  end

  assign timeout = (shadow != '0) && (count == 1) && !cfg_we;
endmodule
