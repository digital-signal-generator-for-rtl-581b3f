// Sine wave LUT: full-wave 2^N x R dual-port ROM (the amplitude quantizer).
//
// Both DDS channels share this one table through two independent read ports,
// as in the realised generator (1024 x 8 bits, one 8 kbit block memory).
// Word k holds one full period of a sine in offset binary:
//
//   lut[k] = round(2^(R-1) + A * sin(2*pi*k / 2^N)),
//   A      = 2^R * (1/2 - DUTY_MIN_PERMYRIAD / 10000)
//
// With the default 5.25 % limit, A = 114.56: a PWM with duty word/2^R then
// swings between 5.25 % and 94.75 %, the modulation depth limit of the
// generator (the rounded words span 13..243, i.e. 5.1 % .. 94.9 %). The exact rounding and offset are this
// design's choice. The table is computed by the initial block, the usual
// way to give an FPGA block ROM its content; synthesis keeps it as one
// 2^N x R memory with two read ports.
//
// Timing: synchronous read, data_x is the word at addr_x of the previous
// clock edge (one cycle of latency), as in an FPGA block ROM.
module sine_lut #(
  parameter int unsigned N = 10,                  // address width
  parameter int unsigned R = 8,                   // word width
  parameter int unsigned DUTY_MIN_PERMYRIAD = 525 // lowest duty, 0.01 % units
) (
  input  logic         clk,
  input  logic [N-1:0] addr_a,
  input  logic [N-1:0] addr_b,
  output logic [R-1:0] data_a,
  output logic [R-1:0] data_b
);
  localparam int unsigned DEPTH = 1 << N;
  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP = (2.0 ** R) * (0.5 - real'(DUTY_MIN_PERMYRIAD) / 10000.0);

  function automatic logic [R-1:0] sample(input int unsigned k);
    real v;
    v = (2.0 ** (R - 1)) + AMP * $sin(TWO_PI * real'(k) / real'(DEPTH));
    return R'($rtoi(v + 0.5));
  endfunction

  // One memory array read by two ports, loaded at elaboration/configuration
  logic [R-1:0] rom [DEPTH];
  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = sample(i);
  end

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end
endmodule
