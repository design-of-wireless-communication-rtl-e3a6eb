// Behavioural model of an additive white Gaussian noise channel, for
// simulation only (it uses $urandom and real arithmetic).
//
// Every valid chip sample on I and Q gets an independent noise value of
// standard deviation sigma added, rounded and saturated to the sample
// width, and leaves one clock later with its valid flag. The Gaussian value
// is approximated by the sum of twelve uniform numbers minus six (mean 0,
// variance 1). sigma = 0 gives a clean, one-cycle-delay channel.
module awgn_channel #(
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic                       clk,
  input  real                        sigma,
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  input  logic                       in_valid,
  output logic signed [SAMPLE_W-1:0] out_i,
  output logic signed [SAMPLE_W-1:0] out_q,
  output logic                       out_valid
);

  localparam int MAXV = (1 << (SAMPLE_W - 1)) - 1;

  function automatic real gauss();
    real acc = 0.0;
    for (int k = 0; k < 12; k++) acc += real'($urandom % 65536) / 65536.0;
    return acc - 6.0;
  endfunction

  function automatic logic signed [SAMPLE_W-1:0] noisy(input logic signed [SAMPLE_W-1:0] v);
    int r;
    real x;
    x = real'(v) + sigma * gauss();
    r = (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(0.5 - x);
    if (r > MAXV)  r = MAXV;
    if (r < -MAXV) r = -MAXV;
    return SAMPLE_W'(r);
  endfunction

  initial begin
    out_i = '0;
    out_q = '0;
    out_valid = 1'b0;
  end

  always @(posedge clk) begin
    out_valid <= in_valid;
    if (in_valid) begin
      out_i <= noisy(in_i);
      out_q <= noisy(in_q);
    end
  end

endmodule
