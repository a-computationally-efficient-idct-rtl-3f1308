// idct_ctrl: sequencing of the multiplexed 1-D IDCT unit.
//
// One 1-D unit computes both passes of the 8x8 2-D IDCT, so a block goes
// through three phases:
//   S_P1   first pass. The core accepts non-zero input coefficients X[u][v]
//          (in_valid/in_ready), grouped by column v; in_last marks the last
//          non-zero coefficient of a column, in_eob the last of the block.
//          Columns without non-zero coefficients are simply not sent. Each
//          accepted coefficient goes to the unit in the same clock.
//   S_WAIT / S_LOAD  the unit drains until the last column of Y is in the
//          transpose memory (p1_end from the write bus); then the non-zero
//          map of Y is copied into `mask`, the transpose memory flags and the
//          output memory row flags are cleared.
//   S_P2   second pass. Each clock the lowest set bit of `mask` picks the next
//          non-zero Y[r][c] in row-major order; it is sent as coefficient
//          u = c of input vector r (a row of Y is a column of Y^T), with
//          first/last/eob worked out from the remaining mask. Zero words and
//          all-zero rows cost no cycle. After the last one the controller
//          returns to S_P1 and the next block may enter while the unit still
//          finishes this one.
// `done` pulses in the clock after the last row of Z was written to the
// output memory (p2_end), when the whole block can be read, or at once if Y
// was all zero. A block of k1 non-zero inputs whose
// first pass leaves k2 non-zero words takes k1 + k2 + 8 clocks from its first
// accepted coefficient to `done`, both clocks counted (k2 = 0: k1 + 5).
// An all-zero input block is sent as a single zero coefficient with both
// in_last and in_eob set. Restarting the accumulators per vector and writing
// after a vector's last element follow the architecture; the state machine,
// the flags and the handshake are this design's.
module idct_ctrl
  import idct_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // core input (first pass)
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  input  logic [IDXW-1:0]        in_u,
  input  logic [IDXW-1:0]        in_v,
  input  logic                   in_last,
  input  logic                   in_eob,
  // to the 1-D unit
  output logic                   sel2,
  output logic                   x1_valid,
  output coef_t                  x1,
  output logic                   x2_valid,
  output coef_t                  x2,
  // transpose memory
  input  logic [N*N-1:0]         tm_nz,
  input  tword_t                 tm_rd_data,
  output logic [IDXW-1:0]        tm_rd_row,
  output logic [IDXW-1:0]        tm_rd_col,
  output logic                   tm_clear,
  // output memory
  output logic                   om_clear,
  // from the write bus
  input  logic                   p1_end,
  input  logic                   p2_end,
  output logic                   done
);

  typedef enum logic [1:0] {S_P1, S_WAIT, S_LOAD, S_P2} state_e;

  state_e         state;
  logic           first1, first2;
  logic [N*N-1:0] mask;
  logic           p2_done;   // last row of Z is in the output memory

  // lowest set bit of the remaining mask
  logic [5:0]     idx;
  logic [N*N-1:0] mask_next;
  logic [N-1:0]   row_rest;

  always_comb begin
    idx = '0;
    for (int i = N*N-1; i >= 0; i--)
      if (mask[i]) idx = 6'(i);
    mask_next = mask & ~(64'(1) << idx);
    row_rest  = mask_next[idx[5:3]*N +: N];
  end

  // first pass: straight from the core input
  always_comb begin
    in_ready    = (state == S_P1);
    x1_valid    = in_valid && in_ready;
    x1.data     = DW'(in_data) <<< TFRAC;
    x1.u        = in_u;
    x1.vec      = in_v;
    x1.first    = first1;
    x1.last     = in_last || in_eob;
    x1.eob      = in_eob;
    x1.pass     = PASS_ROW1;
  end

  // second pass: from the transpose memory, non-zero words only
  always_comb begin
    sel2        = (state == S_P2);
    tm_rd_row   = idx[5:3];
    tm_rd_col   = idx[2:0];
    x2_valid    = (state == S_P2) && (mask != '0);
    x2.data     = tm_rd_data;
    x2.u        = idx[2:0];
    x2.vec      = idx[5:3];
    x2.first    = first2;
    x2.last     = (row_rest == '0);
    x2.eob      = (mask_next == '0);
    x2.pass     = PASS_COL2;
    tm_clear    = (state == S_LOAD);
    om_clear    = (state == S_LOAD);
    done        = p2_done || ((state == S_P2) && (mask == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_P1;
      p2_done <= 1'b0;
      first1  <= 1'b1;
      first2 <= 1'b1;
      mask   <= '0;
    end else begin
      p2_done <= p2_end;
      unique case (state)
        S_P1: if (x1_valid) begin
          first1 <= x1.last;
          if (in_eob) state <= S_WAIT;
        end
        S_WAIT: if (p1_end) state <= S_LOAD;
        S_LOAD: begin
          mask   <= tm_nz;
          first2 <= 1'b1;
          state  <= S_P2;
        end
        S_P2: begin
          if (mask == '0) begin
            state <= S_P1;
          end else begin
            mask   <= mask_next;
            first2 <= x2.last;
            if (x2.eob) state <= S_P1;
          end
        end
        default: state <= S_P1;
      endcase
    end
  end

  // An input coefficient must not be withdrawn while it waits for in_ready.
  property p_in_hold;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && !in_ready) |=> in_valid;
  endproperty
  a_in_hold: assert property (p_in_hold);

endmodule
