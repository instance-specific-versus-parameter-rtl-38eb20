// is_controller: the controller of the instance-specific engine.
//
// After 'start' it walks u from 0 to 2^n - 1 and, for each u, v from 0 to
// 2^n - 1 in steps of TERMS. In every issue cycle it drives TERMS input
// vectors v_k = v_base + k to the first bank of function components and
// v_k xor u to the second bank, so the calculator receives TERMS summation
// terms per cycle. TERMS need not divide 2^n: in the last group of a u the
// terms with v_k >= 2^n are switched off through term_en. When the last terms of a u have been summed, the
// calculator's total is captured into the output register and handed to the
// host with a valid/ready handshake while the next u is already being summed.
// If the host has not taken the previous coefficient yet, issuing stalls.
//
// Timing: one group of TERMS terms per cycle, so ceil(2^n / TERMS) cycles per
// coefficient and 2^n * ceil(2^n / TERMS) cycles for the whole transform, plus
// two cycles of latency and any host stalls. 'done' pulses for one cycle when the
// last coefficient has been accepted by the host.
// The source paper names the controller and its role; the counting order, the
// host handshake and the stall rule are this design's own.
module is_controller #(
  parameter int unsigned N_VARS = 5,
  parameter int unsigned TERMS  = 1,          // 1 .. 2^N_VARS
  parameter int unsigned SUM_W  = N_VARS + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host side
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   coef_valid,
  input  logic                   coef_ready,
  output logic [N_VARS-1:0]      coef_u,
  output logic [SUM_W-1:0]       coef_value,
  // function components
  output logic [N_VARS-1:0]      va [TERMS],
  output logic [N_VARS-1:0]      vb [TERMS],
  // calculator
  output logic [TERMS-1:0]       term_en,
  output logic                   term_valid,
  output logic                   term_clear,
  input  logic [SUM_W-1:0]       calc_sum
);

  if (TERMS < 1 || TERMS > (1 << N_VARS)) begin : g_bad_terms
    $error("is_controller: TERMS must lie between 1 and 2^N_VARS");
  end

  localparam int unsigned SPAN = 1 << N_VARS;

  logic              running;    // terms still to issue
  logic              pending;    // calc_sum holds a finished coefficient
  logic [N_VARS-1:0] u, pending_u;
  logic [N_VARS:0]   v_base;                // one bit wider: the last group may pass 2^n
  logic              issue, capture, last_term, out_free;

  assign out_free  = !coef_valid || coef_ready;
  assign capture   = pending && out_free;
  assign issue     = running && (!pending || capture);
  assign last_term = ((N_VARS + 1)'(v_base) + (N_VARS + 1)'(TERMS) >= (N_VARS + 1)'(SPAN));

  assign busy       = running || pending || coef_valid;
  assign term_valid = issue;
  assign term_clear = (v_base == '0);

  always_comb begin
    for (int k = 0; k < TERMS; k++) begin
      va[k]      = N_VARS'(v_base + (N_VARS + 1)'(k));
      vb[k]      = N_VARS'(v_base + (N_VARS + 1)'(k)) ^ u;
      term_en[k] = (v_base + (N_VARS + 1)'(k)) < (N_VARS + 1)'(SPAN);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      pending    <= 1'b0;
      u          <= '0;
      pending_u  <= '0;
      v_base     <= '0;
      coef_valid <= 1'b0;
      coef_u     <= '0;
      coef_value <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        running <= 1'b1;
        u       <= '0;
        v_base  <= '0;
      end

      if (coef_valid && coef_ready) begin
        coef_valid <= 1'b0;
        if (!running && !pending && coef_u == '1) done <= 1'b1;
      end
      if (capture) begin
        coef_valid <= 1'b1;
        coef_u     <= pending_u;
        coef_value <= calc_sum;
      end

      if (capture) pending <= 1'b0;
      if (issue) begin
        if (last_term) begin
          pending   <= 1'b1;
          pending_u <= u;
          v_base    <= '0;
          u         <= u + 1'b1;
          if (u == '1) running <= 1'b0;
        end else begin
          v_base <= v_base + (N_VARS + 1)'(TERMS);
        end
      end
    end
  end

  // A coefficient offered to the host stays put until it is taken.
  a_coef_hold: assert property (@(posedge clk) disable iff (!rst_n)
    coef_valid && !coef_ready |=> coef_valid && $stable(coef_value) && $stable(coef_u));

endmodule
