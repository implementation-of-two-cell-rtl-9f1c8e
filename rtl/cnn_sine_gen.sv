// cnn_sine_gen -- sinusoidal input g[n] = A * sin(2*pi*n*T / 4) of cell 1.
//
// The drive of the non-autonomous network has period 4 time units. A 14-bit
// phase register counts time t = n*T in the same Q3.12 units as T itself, so
// it wraps at exactly t = 4.0 (2^14 codes): every 'step' adds the sampling
// period T to it, and 'clear' returns it to t = 0. The two upper phase bits
// select the quadrant, the next eight index a 257-entry quarter-wave table
// holding round(32767 * sin(pi/2 * k/256)), k = 0..256 (file
// rtl/cnn_sine_rom.hex), and quadrant symmetry gives the full wave. The table
// value is scaled by the amplitude register A (Q3.12) and rounded to Q3.12.
// g is registered: it follows a change of phase or amplitude one clock later.
// The waveform and its period follow the reference model; the phase
// accumulator, table size and nearest-lower table lookup are this design's
// choices.
module cnn_sine_gen
  import cnn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,   // phase <- 0 (t = 0)
  input  logic   step,    // phase <- phase + T (next sample)
  input  q3_12_t t_step,  // sampling period T, Q3.12
  input  q3_12_t amp,     // amplitude A, Q3.12
  output q3_12_t g,       // A * sin(2*pi*t/4), Q3.12
  output logic [13:0] phase
);

  logic [14:0] rom [0:256];   // Q1.15 magnitudes, 0 .. 32767
  initial $readmemh("rtl/cnn_sine_rom.hex", rom);

  logic [1:0]          quad;
  logic [7:0]          idx;
  logic [8:0]          addr;
  logic signed [15:0]  s_val;    // signed sine sample, Q1.15
  logic signed [31:0]  prod;     // A * sin, Q4.27
  logic signed [31:0]  prod_rnd;

  always_comb begin
    quad  = phase[13:12];
    idx   = phase[11:4];
    addr  = quad[0] ? (9'd256 - {1'b0, idx}) : {1'b0, idx};
    s_val = quad[1] ? -$signed({1'b0, rom[addr]}) : $signed({1'b0, rom[addr]});
    prod     = amp * s_val;
    prod_rnd = (prod + 32'sd16384) >>> 15;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      g     <= '0;
    end else begin
      if (clear)     phase <= '0;
      else if (step) phase <= phase + t_step[13:0];
      g <= prod_rnd[15:0];
    end
  end

endmodule
