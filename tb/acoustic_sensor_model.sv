// acoustic_sensor_model: behavioural model of the acoustic particle-strike
// detector array (not synthesizable logic: it stands in for on-die
// cantilever sensors).
//
// A pulse on strike marks a particle hitting the core in that cycle. The
// model raises err_detect for one cycle a random number of cycles later,
// between 1 and WCDL, the worst-case detection latency the sensor placement
// guarantees. Several strikes before an alarm give one alarm at the earliest
// of their deadlines. The randomised latency is this model's choice; the
// bound is the property the recovery hardware relies on.
module acoustic_sensor_model #(
  parameter int unsigned WCDL = 30
) (
  input  logic clk,
  input  logic rst_n,
  input  logic strike,
  output logic err_detect
);

  longint now;        // cycle number
  longint deadline;   // cycle of the pending alarm; -1 when none is pending

  always @(posedge clk) begin
    if (!rst_n) begin
      now        <= 0;
      deadline   <= -1;
      err_detect <= 1'b0;
    end else begin
      longint d;
      d = deadline;
      if (strike) begin
        longint t;
        t = now + longint'($urandom_range(1, WCDL));
        if (d < 0 || t < d) d = t;
      end
      // the alarm is high in cycle d
      err_detect <= (d == now + 1);
      deadline   <= (d == now + 1) ? -1 : d;
      now        <= now + 1;
    end
  end

endmodule
