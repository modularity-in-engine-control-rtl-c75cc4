// axb_tb_channel: behavioural model of one direction of a serial lane.
//
// Stands for LVDS driver, cable, receiver and the receiver's input delay
// element. The bit on `in_bit` appears on `out_bit` LAT cycles later.
// Skew is modelled by a data eye: the receiver samples correctly only when
// its delay tap lies within EYE taps of SKEW (distance taken round the
// NTAPS taps); outside the eye every bit is random. Inside the eye each
// bit is flipped with probability err_per_1000/1000 (a run-time input, so
// a testbench can switch between quiet, noisy and burst-error periods).
// `cut` forces the line to a constant 0, a broken cable. `flips` counts
// injected bit errors.
module axb_tb_channel #(
  parameter int unsigned NTAPS = 32,
  parameter int unsigned SKEW  = 0,
  parameter int unsigned EYE   = 3,
  parameter int unsigned LAT   = 3
) (
  input  logic                     clk,
  input  logic                     in_bit,
  input  logic [$clog2(NTAPS)-1:0] tap,
  input  int unsigned              err_per_1000,
  input  logic                     cut,
  output logic                     out_bit,
  output int unsigned              flips
);

  logic [LAT-1:0] dly = '0;
  int unsigned    tap_dist;

  initial flips = 0;

  always_comb begin
    tap_dist = (int'(tap) >= int'(SKEW)) ? int'(tap) - int'(SKEW) : int'(SKEW) - int'(tap);
    if (tap_dist > NTAPS / 2) tap_dist = NTAPS - tap_dist;
  end

  always_ff @(posedge clk) begin
    logic b;
    dly <= {dly[LAT-2:0], in_bit};
    b = dly[LAT-1];
    if (cut) begin
      b = 1'b0;
    end else if (tap_dist > EYE) begin
      b = 1'($urandom);
    end else if (err_per_1000 != 0 && ($urandom % 1000) < err_per_1000) begin
      b = ~b;
      flips <= flips + 1;
    end
    out_bit <= b;
  end

endmodule
