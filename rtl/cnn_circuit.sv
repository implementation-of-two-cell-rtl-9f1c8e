// cnn_circuit -- the CNN circuit: parameter registers and iteration engine.
//
// Holds the eight 16-bit Q3.12 registers of the model (initial states
// x1(0), x2(0); the four coupling weights A11 = p, A12 = -s, A21 = s,
// A22 = p; the sampling period T; the sine amplitude A) and solves the
// discrete-time two-cell network iteratively:
//   x1[n+1] = ( x1[n]/T + p f(x1[n]) - s f(x2[n]) + g[n] ) / (1 + 1/T)
//   x2[n+1] = ( x2[n]/T + s f(x1[n]) + p f(x2[n]) )        / (1 + 1/T)
//   g[n]    = A sin(2 pi n T / 4)
// The state history lives in the CNN cache: 'start' writes x(0) at cache
// address 0; each iteration then reads x[n] back from address n, computes
// x[n+1] in the two cell units (in parallel) and writes it at address n+1
// (addresses modulo DEPTH). One iteration starts on each 'tick' of the clock
// generator while the run is active.
//
// Control: cmd_start (initialise and run) and cmd_resume are taken when no
// iteration is in flight; cmd_stop pauses after the current iteration. A
// tick that arrives while an iteration is still being computed is dropped
// and sets the sticky 'overrun' flag (cleared by cmd_start). Registers may be
// written at any time; a new value is used from the next iteration on.
// Timing: iter_done rises 44 board clocks after the tick (read, data, 40
// cycles in the cells, done, write), so the tick period must be at least 45
// clocks; the default clock generator gives 50.
// The register set and the iteration through the cache follow the reference
// design; the control commands, the FSM and its timing are this design's.
module cnn_circuit
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH  = 5120,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  // register write port
  input  logic              reg_we,
  input  reg_addr_e         reg_addr,
  input  q3_12_t            reg_wdata,
  // control
  input  logic              cmd_start,
  input  logic              cmd_stop,
  input  logic              cmd_resume,
  // cache: write port and circuit read port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output q3_12_t            wr_x1,
  output q3_12_t            wr_x2,
  output logic              c_rd_en,
  output logic [ADDR_W-1:0] c_rd_addr,
  input  q3_12_t            rd_x1,
  input  q3_12_t            rd_x2,
  // status
  output logic              running,
  output logic              overrun,
  output logic              iter_done,   // pulse: x[n+1] written
  output logic [31:0]       n_count,     // iterations since start
  output q3_12_t            x1,          // latest state
  output q3_12_t            x2,
  output q3_12_t            g            // current sine input g[n]
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_WAIT, S_READ, S_LOAD, S_CALC, S_WRITE
  } state_e;

  state_e state_q;

  // ---------------- parameter registers ----------------
  q3_12_t x1_init_q, x2_init_q, a11_q, a12_q, a21_q, a22_q, t_q, amp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_init_q <= X1_DEFAULT;
      x2_init_q <= X2_DEFAULT;
      a11_q     <= P_DEFAULT;
      a12_q     <= -S_DEFAULT;
      a21_q     <= S_DEFAULT;
      a22_q     <= P_DEFAULT;
      t_q       <= T_DEFAULT;
      amp_q     <= AMP_DEFAULT;
    end else if (reg_we) begin
      unique case (reg_addr)
        REG_X1_INIT: x1_init_q <= reg_wdata;
        REG_X2_INIT: x2_init_q <= reg_wdata;
        REG_A11:     a11_q     <= reg_wdata;
        REG_A12:     a12_q     <= reg_wdata;
        REG_A21:     a21_q     <= reg_wdata;
        REG_A22:     a22_q     <= reg_wdata;
        REG_T:       t_q       <= reg_wdata;
        REG_AMP:     amp_q     <= reg_wdata;
      endcase
    end
  end

  // ---------------- datapath ----------------
  q3_12_t f1, f2;
  logic   cell_start;
  logic   busy1, busy2, done1, done2;
  q3_12_t x1_next, x2_next;
  logic   sine_clear, sine_step;
  logic [13:0] phase;

  cnn_pwl u_f1 (.x(rd_x1), .y(f1));
  cnn_pwl u_f2 (.x(rd_x2), .y(f2));

  cnn_sine_gen u_sine (
    .clk(clk), .rst_n(rst_n), .clear(sine_clear), .step(sine_step),
    .t_step(t_q), .amp(amp_q), .g(g), .phase(phase)
  );

  cnn_cell u_cell1 (
    .clk(clk), .rst_n(rst_n), .start(cell_start),
    .x_self(rd_x1), .f1(f1), .f2(f2), .c1(a11_q), .c2(a12_q), .u(g),
    .t_step(t_q), .busy(busy1), .done(done1), .x_next(x1_next)
  );

  cnn_cell u_cell2 (
    .clk(clk), .rst_n(rst_n), .start(cell_start),
    .x_self(rd_x2), .f1(f1), .f2(f2), .c1(a21_q), .c2(a22_q), .u(16'sd0),
    .t_step(t_q), .busy(busy2), .done(done2), .x_next(x2_next)
  );

  // ---------------- control ----------------
  logic [ADDR_W-1:0] ptr_q;      // cache address of x[n]
  logic [ADDR_W-1:0] ptr_next;
  logic              run_q;      // run requested
  logic              init_q;     // a start has been done since reset

  assign ptr_next = (ptr_q == ADDR_W'(DEPTH - 1)) ? '0 : ptr_q + 1'b1;

  always_comb begin
    wr_en      = 1'b0;
    wr_addr    = ptr_next;
    wr_x1      = x1_next;
    wr_x2      = x2_next;
    c_rd_en    = (state_q == S_READ);
    c_rd_addr  = ptr_q;
    cell_start = (state_q == S_LOAD);
    sine_clear = (state_q == S_INIT);
    sine_step  = (state_q == S_WRITE);
    unique case (state_q)
      S_INIT: begin
        wr_en   = 1'b1;
        wr_addr = '0;
        wr_x1   = x1_init_q;
        wr_x2   = x2_init_q;
      end
      S_WRITE: wr_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      ptr_q     <= '0;
      run_q     <= 1'b0;
      init_q    <= 1'b0;
      overrun   <= 1'b0;
      iter_done <= 1'b0;
      n_count   <= '0;
      x1        <= '0;
      x2        <= '0;
    end else begin
      iter_done <= 1'b0;
      if (cmd_stop) run_q <= 1'b0;
      if (tick && run_q && state_q inside {S_READ, S_LOAD, S_CALC, S_WRITE})
        overrun <= 1'b1;

      unique case (state_q)
        S_IDLE, S_WAIT: begin
          if (cmd_start) begin
            state_q <= S_INIT;
            run_q   <= 1'b1;
          end else if (cmd_resume && init_q) begin
            state_q <= S_WAIT;
            run_q   <= 1'b1;
          end else if (state_q == S_WAIT && (!run_q || cmd_stop)) begin
            state_q <= S_IDLE;
          end else if (state_q == S_WAIT && tick) begin
            state_q <= S_READ;
          end
        end
        S_INIT: begin
          ptr_q   <= '0;
          n_count <= '0;
          overrun <= 1'b0;
          init_q  <= 1'b1;
          x1      <= x1_init_q;
          x2      <= x2_init_q;
          state_q <= S_WAIT;
        end
        S_READ:  state_q <= S_LOAD;
        S_LOAD:  state_q <= S_CALC;
        S_CALC:  if (done1 && done2) state_q <= S_WRITE;
        S_WRITE: begin
          ptr_q     <= ptr_next;
          n_count   <= n_count + 1'b1;
          x1        <= x1_next;
          x2        <= x2_next;
          iter_done <= 1'b1;
          state_q   <= S_WAIT;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign running = run_q;

  // both cells have the same latency
  assert property (@(posedge clk) disable iff (!rst_n) done1 == done2);
  // a cell is never started while still busy
  assert property (@(posedge clk) disable iff (!rst_n) cell_start |-> !busy1 && !busy2);

endmodule
