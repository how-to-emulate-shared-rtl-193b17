// rehash_control: guards the running time of the emulated PRAM steps and
// chooses a new hash function when a step overruns.
//
// The hash coefficients live here and feed every hash_row. The host can
// write all of them at once (`coef_load`, `coef_in`). During a step the
// unit counts the cycles since `step_start`. If `step_done` has not come
// when the count reaches the allotted time (`step_limit`, but never less
// than the ZETA+1 cycles of hashing, so the coefficients never change under
// a running hash), it pulses `overrun` and draws a new hash function: one
// coefficient per cycle from a 32-bit Galois LFSR (taps x^32+x^22+x^2+x+1),
// reduced mod P. `rehash_busy` is high for those ZETA cycles, after which
// `rehash_ready` pulses and `rehash_count` is incremented. The step in
// flight still finishes with the old placement. Moving every variable to
// its new module is left to the host: it reads `coef` and reloads the
// memories before the next step. `seed_we` reseeds the LFSR (a zero seed is
// replaced by 1).
// Timing: `overrun` is registered, one cycle after the cycle count reaches
// the limit; the new coefficients are complete ZETA cycles later.
// Detecting a step that does not finish in its allotted time and choosing
// a new random hash function follow the design. The LFSR, its reduction
// mod P (which is slightly non-uniform), and leaving the moving of variables
// to the host are this implementation's choices.
module rehash_control
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host access to the hash function
  input  logic              coef_load,
  input  logic [P_W-1:0]    coef_in [ZETA],
  input  logic              seed_we,
  input  logic [31:0]       seed,
  output logic [P_W-1:0]    coef    [ZETA],
  // step timing
  input  logic              step_start,
  input  logic              step_done,
  input  logic [31:0]       step_limit,
  output logic              overrun,
  output logic              rehash_busy,
  output logic              rehash_ready,
  output logic [31:0]       rehash_count
);
  localparam int unsigned IW = $clog2(ZETA + 1);
  localparam logic [31:0] TAPS = 32'h8020_0003;   // x^32 + x^22 + x^2 + x + 1

  logic [31:0]   lfsr;
  logic [31:0]   lfsr_next;
  logic [31:0]   cyc;        // cycles since step_start
  logic          timing;     // a step is running and has not overrun
  logic [31:0]   limit;
  logic [IW-1:0] gen_idx;    // next coefficient to draw

  assign lfsr_next = lfsr[0] ? ((lfsr >> 1) ^ TAPS) : (lfsr >> 1);
  assign limit     = (step_limit > 32'(ZETA + 1)) ? step_limit : 32'(ZETA + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ZETA; i++) coef[i] <= '0;
      lfsr         <= 32'h1;
      cyc          <= '0;
      timing       <= 1'b0;
      gen_idx      <= '0;
      overrun      <= 1'b0;
      rehash_busy  <= 1'b0;
      rehash_ready <= 1'b0;
      rehash_count <= '0;
    end else begin
      overrun      <= 1'b0;
      rehash_ready <= 1'b0;

      if (seed_we) lfsr <= (seed == '0) ? 32'h1 : seed;

      // step timer
      if (step_start) begin
        cyc    <= '0;
        timing <= 1'b1;
      end else if (timing) begin
        if (step_done) begin
          timing <= 1'b0;
        end else if (cyc + 1 >= limit) begin
          timing  <= 1'b0;
          overrun <= 1'b1;
          if (!rehash_busy) begin
            rehash_busy <= 1'b1;
            gen_idx     <= '0;
          end
        end else begin
          cyc <= cyc + 1;
        end
      end

      // coefficients: host load, or a new random hash function
      if (coef_load) begin
        for (int i = 0; i < ZETA; i++) coef[i] <= coef_in[i];
      end else if (rehash_busy) begin
        if (!seed_we) lfsr <= lfsr_next;
        coef[gen_idx] <= P_W'(lfsr % P);
        gen_idx       <= gen_idx + 1'b1;
        if (gen_idx == IW'(ZETA - 1)) begin
          rehash_busy  <= 1'b0;
          rehash_ready <= 1'b1;
          rehash_count <= rehash_count + 1;
        end
      end
    end
  end

  a_coef_range: assert property (@(posedge clk) disable iff (!rst_n)
    coef_load |-> (32'(coef_in[0]) < P && 32'(coef_in[ZETA-1]) < P));
  a_no_load_during_step: assert property (@(posedge clk) disable iff (!rst_n)
    rehash_busy |-> !step_start);
endmodule
