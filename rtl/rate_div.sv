// rate_div: restartable clock-enable divider.
//
// While enable is high the counter advances once per clock and tick is high
// for one clock every DIV clocks: on the DIV-th, 2*DIV-th, ... enabled clock.
// While enable is low the counter is held at zero, so counting restarts from
// the beginning each time enable rises. tick is combinational from the count
// and enable. Used by button_ctrl to turn a held button into a step rate.
module rate_div #(
  parameter int unsigned DIV = 50_000   // clocks per tick, at least 1
) (
  input  logic clock,
  input  logic enable,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [W-1:0] LAST = W'(DIV - 1);

  logic [W-1:0] cnt;

  always_ff @(posedge clock) begin
    if (!enable || cnt == LAST) cnt <= '0;
    else                        cnt <= cnt + 1'b1;
  end

  assign tick = enable && (cnt == LAST);

endmodule
