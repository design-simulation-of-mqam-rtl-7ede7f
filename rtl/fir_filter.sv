// fir_filter: direct-form FIR filter, used both as the transmit pulse-shaping
// filter and as the receive matched filter.
//
// y[n] = sum_{k=0}^{N_TAPS-1} COEFS[k] * x[n-k]. The current input and the
// N_TAPS-1 previous inputs (a shift register) are multiplied by the
// coefficients and summed in one cycle; the sum is registered, so dout is
// y[n] one clock after x[n] is on din. The full-precision sum is
// IN_W + COEF_W + clog2(N_TAPS) bits wide and saturates to OUT_W. The
// default coefficients are the one-chip half-sine pulse of zigbee_pkg, the
// "sine function pulse shaping filter" of the description; the tap count,
// widths and direct-form structure are this design's choices.
//
// Ports: en (sample enable; the filter holds when low), din (IN_W signed),
// dout (OUT_W signed, registered).
module fir_filter
  import zigbee_pkg::*;
#(
  parameter int unsigned IN_W   = 2,
  parameter int unsigned OUT_W  = 15,
  parameter int unsigned NT     = N_TAPS,
  parameter coef_t       COEFS [NT] = HALF_SINE
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(NT);
  localparam logic signed [ACC_W-1:0] MAX_OUT = ACC_W'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MIN_OUT = -MAX_OUT - 1;

  logic signed [IN_W-1:0]  taps_q [NT-1];   // x[n-1] .. x[n-NT+1]
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(din) * ACC_W'(COEFS[0]);
    for (int k = 1; k < NT; k++)
      acc += ACC_W'(taps_q[k-1]) * ACC_W'(COEFS[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NT-1; k++) taps_q[k] <= '0;
      dout <= '0;
    end else if (en) begin
      taps_q[0] <= din;
      for (int k = 1; k < NT-1; k++) taps_q[k] <= taps_q[k-1];
      if (acc > MAX_OUT)      dout <= MAX_OUT[OUT_W-1:0];
      else if (acc < MIN_OUT) dout <= MIN_OUT[OUT_W-1:0];
      else                    dout <= acc[OUT_W-1:0];
    end
  end

endmodule
