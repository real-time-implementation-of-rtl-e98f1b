// tb_qpsk_channel: stimulus for the end-to-end testbenches. Generates NSYM
// random dual-polarization QPSK symbols (level 0.5) as rectangular pulses at
// two samples per symbol and passes them through a small channel: a Kerr
// phase rotation proportional to the power (KERR_PHI rad at nominal power),
// a real polarization rotation by THETA, one-sample inter-symbol interference
// ISI and uniform noise of peak NOISE/2. Delivers one symbol (two samples) per
// clock on din, din[0] the newer sample, from the first clock after reset
// until all symbols are sent. The transmitted symbol with index qa is
// returned on ra (0 for indices out of range); level() gives the same for
// any index.
module tb_qpsk_channel
  import ml_eq_pkg::*;
#(
  parameter int  NSYM     = 1000,
  parameter real THETA    = 0.35,
  parameter real ISI      = 0.15,
  parameter real KERR_PHI = 0.3,
  parameter real NOISE    = 0.02
) (
  input  logic clk,
  input  logic rst_n,
  output logic in_valid,
  output dp_t  din [2],
  input  int   qa,
  output dp_t  ra
);

  logic [3:0] tx [NSYM];

  function automatic dp_t level(input int i);
    dp_t d;
    if (i < 0 || i >= NSYM) return '0;
    d[0].re = tx[i][0] ? samp_t'(-2048) : samp_t'(2048);
    d[0].im = tx[i][1] ? samp_t'(-2048) : samp_t'(2048);
    d[1].re = tx[i][2] ? samp_t'(-2048) : samp_t'(2048);
    d[1].im = tx[i][3] ? samp_t'(-2048) : samp_t'(2048);
    return d;
  endfunction

  assign ra = level(qa);

  function automatic samp_t q12(input real v);
    real r;
    r = v * 4096.0;
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return samp_t'($rtoi(r < 0 ? r - 0.5 : r + 0.5));
  endfunction

  function automatic real urand();
    return (real'($urandom_range(0, 65535)) / 65535.0) - 0.5;
  endfunction

  function automatic real lvl(input logic b);
    return b ? -0.5 : 0.5;
  endfunction

  real prev [4];

  initial begin
    real v [4];
    real t [4];
    real c, s, ph;
    dp_t smp [2];
    for (int i = 0; i < NSYM; i++) tx[i] = 4'($urandom_range(0, 15));
    for (int k = 0; k < 4; k++) prev[k] = 0.0;
    in_valid = 1'b0;
    din[0] = '0;
    din[1] = '0;
    wait (rst_n);
    for (int i = 0; i < NSYM; i++) begin
      for (int hs = 0; hs < 2; hs++) begin
        for (int k = 0; k < 4; k++) v[k] = lvl(tx[i][k]);
        // Kerr phase e^{+j phi}, phi proportional to power
        ph = KERR_PHI * (v[0] * v[0] + v[1] * v[1] + v[2] * v[2] + v[3] * v[3]);
        c = $cos(ph);
        s = $sin(ph);
        t[0] = v[0] * c - v[1] * s;  t[1] = v[1] * c + v[0] * s;
        t[2] = v[2] * c - v[3] * s;  t[3] = v[3] * c + v[2] * s;
        // polarization rotation
        v[0] =  $cos(THETA) * t[0] + $sin(THETA) * t[2];
        v[1] =  $cos(THETA) * t[1] + $sin(THETA) * t[3];
        v[2] = -$sin(THETA) * t[0] + $cos(THETA) * t[2];
        v[3] = -$sin(THETA) * t[1] + $cos(THETA) * t[3];
        // ISI from the previous sample, then noise
        for (int k = 0; k < 4; k++) begin
          t[k] = v[k] + ISI * prev[k] + NOISE * urand();
          prev[k] = v[k];
        end
        smp[hs][0].re = q12(t[0]);
        smp[hs][0].im = q12(t[1]);
        smp[hs][1].re = q12(t[2]);
        smp[hs][1].im = q12(t[3]);
      end
      @(negedge clk);
      in_valid = 1'b1;
      din[1] = smp[0];
      din[0] = smp[1];
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

endmodule
