// Two-phase clock for the 8008 microprocessor.
//
// On the board the two non-overlapping clock phases come from a ring of
// retriggerable monostables whose pulse widths are trimmed by resistors.
// Here they are counted from a fast system clock: phi1 is high for PHI1_W
// cycles, then after GAP12 cycles phi2 is high for PHI2_W cycles, and the
// pattern repeats every CYCLE cycles. With a 10 MHz system clock the defaults
// give a 2.0 us clock period, 0.7 us phi1, 0.7 us phi2, 0.2 us from phi1 to
// phi2, 0.9 us from the fall of phi1 to the fall of phi2 and 0.4 us from
// phi2 to phi1, within the 8008's published clock limits (period 2 to 3 us,
// phi1 at least 0.7 us, phi2 at least 0.55 us, 0.9 to 1.1 us between the
// falling edges, at least 0.2 us and 0.4 us between the phases).
// Interface: clk and rst_n in, phi1 and phi2 out (registered, glitch-free).
module cb_clockgen #(
  parameter int unsigned CYCLE  = 20,
  parameter int unsigned PHI1_W = 7,
  parameter int unsigned GAP12  = 2,
  parameter int unsigned PHI2_W = 7
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,
  output logic phi2
);

  logic [$clog2(CYCLE)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      phi1 <= 1'b0;
      phi2 <= 1'b0;
    end else begin
      cnt  <= (32'(cnt) == CYCLE - 1) ? '0 : cnt + 1'b1;
      phi1 <= (32'(cnt) < PHI1_W);
      phi2 <= (32'(cnt) >= PHI1_W + GAP12) && (32'(cnt) < PHI1_W + GAP12 + PHI2_W);
    end
  end

  initial begin
    assert (PHI1_W + GAP12 + PHI2_W < CYCLE)
      else $error("clock phases do not fit in one cycle");
  end

endmodule
