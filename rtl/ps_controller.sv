// ps_controller: sequencer of the parameter-specific engine.
//
// It owns the single SRAM port (one access per clock) and runs, after 'start':
//   1. Don't-care pass. For every cube i: read the cube word, then write it
//      back with the don't-care count filled in (2 cycles per cube).
//   2. For each batch of N_PAR values of u, for every cube c = i of the list:
//      read c into the cube register (its stored don't-care count goes to the
//      don't-care register), then read all n_cubes cubes d = 0..n_cubes-1, one
//      per cycle, while the comparator tests c xor u_k inside d for every u_k.
//      The read of the last d commits the weight 2^dc(c) to every u_k that hit.
//      That is n_cubes + 1 reads per cube and n_cubes*(n_cubes+1) per batch.
//   3. Write the N_PAR coefficients of the batch to the result area, one per
//      cycle, at RESULT_BASE + batch*N_PAR + k.
// The SRAM is synchronous with one cycle of read latency, so the controller
// registers a tag with each read ('rd_*' outputs) telling the datapath what
// the data on the bus will be in the next cycle.
//
// Cycle count of a run: 2*n_cubes + n_batches*(n_cubes*(n_cubes+1) + 1 + N_PAR)
// cycles from 'start' to the cycle before 'done'.
// The procedure (shift each cube by u, search the list for it, add its weight)
// and the one-access-per-cycle limit are the source paper's; the SRAM map, the
// storage of the don't-care count beside its cube and the exact schedule are
// this design's own.
module ps_controller #(
  parameter int unsigned N_PAR         = 64,
  parameter int unsigned MAX_CUBES_LOG2 = 19,
  parameter int unsigned RESULT_LOG2   = 20,
  parameter int unsigned AW            = RESULT_LOG2 + 1,
  parameter int unsigned NB_W          = RESULT_LOG2 - $clog2(N_PAR) + 1,
  parameter int unsigned IDX_W         = (N_PAR > 1) ? $clog2(N_PAR) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host side
  input  logic                    start,
  input  logic [MAX_CUBES_LOG2:0] n_cubes,    // 1 .. 2^MAX_CUBES_LOG2
  input  logic [NB_W-1:0]         n_batches,  // 1 .. 2^RESULT_LOG2 / N_PAR
  output logic                    busy,
  output logic                    done,
  // SRAM address side
  output logic                    sram_en,
  output logic                    sram_we,
  output logic [AW-1:0]           sram_addr,
  output logic                    wr_result,  // write data: 1 = result, 0 = cube with dc count
  // read tags, valid in the cycle the read data is on the bus
  output logic                    rd_dc,      // cube to count
  output logic                    rd_load,    // cube c for the cube/don't-care registers
  output logic                    rd_cmp,     // cube d to compare against
  output logic                    rd_last,    // ... and it is the last d for this c
  // datapath control
  output logic                    u_load,
  output logic                    u_advance,
  output logic                    contrib_clear,
  output logic [IDX_W-1:0]        result_idx
);

  localparam logic [AW-1:0] RESULT_BASE = AW'(1) << RESULT_LOG2;

  typedef enum logic [2:0] {
    S_IDLE, S_DC_RD, S_DC_WR, S_LOAD, S_SCAN, S_DRAIN, S_WRITE, S_DONE
  } state_t;

  state_t                  state;
  logic [MAX_CUBES_LOG2:0] i, j;
  logic [NB_W-1:0]         batch;
  logic [IDX_W-1:0]        k;
  logic                    last_i, last_j, last_k, last_batch;

  assign last_i     = (i == n_cubes - 1'b1);
  assign last_j     = (j == n_cubes - 1'b1);
  assign last_k     = (k == IDX_W'(N_PAR - 1));
  assign last_batch = (batch == n_batches - 1'b1);

  assign busy       = (state != S_IDLE);
  assign result_idx = k;

  // Address side: one access per cycle.
  always_comb begin
    sram_en       = 1'b0;
    sram_we       = 1'b0;
    sram_addr     = '0;
    wr_result     = 1'b0;
    u_load        = 1'b0;
    u_advance     = 1'b0;
    contrib_clear = 1'b0;
    unique case (state)
      S_IDLE: begin
        u_load        = start;
        contrib_clear = start;
      end
      S_DC_RD: begin
        sram_en   = 1'b1;
        sram_addr = AW'(i);
      end
      S_DC_WR: begin
        sram_en   = 1'b1;
        sram_we   = 1'b1;
        sram_addr = AW'(i);
      end
      S_LOAD: begin
        sram_en   = 1'b1;
        sram_addr = AW'(i);
      end
      S_SCAN: begin
        sram_en   = 1'b1;
        sram_addr = AW'(j);
      end
      S_DRAIN: ;
      S_WRITE: begin
        sram_en       = 1'b1;
        sram_we       = 1'b1;
        wr_result     = 1'b1;
        sram_addr     = RESULT_BASE + AW'((AW'(batch) * AW'(N_PAR)) + AW'(k));
        u_advance     = last_k && !last_batch;
        contrib_clear = last_k;
      end
      S_DONE: ;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i       <= '0;
      j       <= '0;
      k       <= '0;
      batch   <= '0;
      done    <= 1'b0;
      rd_dc   <= 1'b0;
      rd_load <= 1'b0;
      rd_cmp  <= 1'b0;
      rd_last <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_dc   <= (state == S_DC_RD);
      rd_load <= (state == S_LOAD);
      rd_cmp  <= (state == S_SCAN);
      rd_last <= (state == S_SCAN) && last_j;
      unique case (state)
        S_IDLE:
          if (start) begin
            i     <= '0;
            batch <= '0;
            state <= S_DC_RD;
          end
        S_DC_RD: state <= S_DC_WR;
        S_DC_WR:
          if (last_i) begin
            i     <= '0;
            state <= S_LOAD;
          end else begin
            i     <= i + 1'b1;
            state <= S_DC_RD;
          end
        S_LOAD: begin
          j     <= '0;
          state <= S_SCAN;
        end
        S_SCAN:
          if (!last_j) begin
            j <= j + 1'b1;
          end else if (!last_i) begin
            i     <= i + 1'b1;
            state <= S_LOAD;
          end else begin
            state <= S_DRAIN;
          end
        S_DRAIN: begin
          k     <= '0;
          state <= S_WRITE;
        end
        S_WRITE:
          if (!last_k) begin
            k <= k + 1'b1;
          end else if (!last_batch) begin
            batch <= batch + 1'b1;
            i     <= '0;
            state <= S_LOAD;
          end else begin
            state <= S_DONE;
          end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The host must not restart a run in progress, and a run needs cubes and batches.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy && n_cubes != '0 && n_batches != '0);

endmodule
