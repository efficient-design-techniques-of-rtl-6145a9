// pooling_block: L x L max pooling with stride L over a KIN x KIN feature map
// that arrives one value per valid cycle in row-major order. Several maps may
// follow each other; KIN must be a multiple of L.
//
// How it works: the Row Max Pooling FSM writes L consecutive values of a row
// into L registers and takes their maximum, giving KIN/L results per row.
// Results of row r go into Pooling FIFO (r mod L), each KIN/L deep. As soon
// as every FIFO holds a value (i.e. row L-1 of a band has produced one), the
// Column Max Pooling FSM pops one value from each FIFO and outputs their
// maximum, so the (KIN/L)^2 results leave in row-major order.
//
// Timing: out_valid is registered; a result leaves two cycles after the last
// input of its L x L window. There is no backpressure. The structure (row
// registers, L FIFOs, column maximum) follows the design description; the
// FIFO depth and the pop-when-all-non-empty rule are implementation choices.
module pooling_block
  import cnn_pkg::*;
#(
  parameter int KIN = 76,
  parameter int L   = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in_data,
  output logic out_valid,
  output act_t out_data
);
  localparam int D  = KIN / L;
  localparam int DW = $clog2(D + 1);
  localparam int CW = $clog2(KIN);
  localparam int LW = (L > 1) ? $clog2(L) : 1;
  localparam int PW = (D > 1) ? $clog2(D) : 1;

  function automatic act_t amax(act_t a, act_t b);
    return (a > b) ? a : b;
  endfunction

  // Row max stage.
  act_t          rreg [L];
  logic [LW-1:0] g;        // position within the group of L
  logic [CW-1:0] c;        // column
  logic [LW-1:0] ridx;     // row mod L
  act_t          rmax;

  always_comb begin
    rmax = in_data;
    for (int i = 0; i < L - 1; i++) rmax = amax(rmax, rreg[i]);
  end

  // Pooling FIFOs.
  act_t          fifo [L][D];
  logic [PW-1:0] wp [L];
  logic [PW-1:0] rp [L];
  logic [DW-1:0] cnt [L];
  logic          all_ne;
  logic          push;

  always_comb begin
    all_ne = 1'b1;
    for (int i = 0; i < L; i++) all_ne &= (cnt[i] != 0);
  end
  assign push = in_valid && (g == LW'(L-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g <= '0; c <= '0; ridx <= '0;
      out_valid <= 1'b0; out_data <= '0;
      for (int i = 0; i < L; i++) begin
        wp[i] <= '0; rp[i] <= '0; cnt[i] <= '0; rreg[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        rreg[g] <= in_data;
        g <= (g == LW'(L-1)) ? '0 : g + 1'b1;
        if (c == CW'(KIN-1)) begin
          c    <= '0;
          ridx <= (ridx == LW'(L-1)) ? '0 : ridx + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
      for (int i = 0; i < L; i++) begin
        logic wr, rd;
        wr = push && (ridx == LW'(i));
        rd = all_ne;
        if (wr) begin
          fifo[i][wp[i]] <= rmax;
          wp[i] <= (wp[i] == PW'(D-1)) ? '0 : wp[i] + 1'b1;
        end
        if (rd) rp[i] <= (rp[i] == PW'(D-1)) ? '0 : rp[i] + 1'b1;
        cnt[i] <= cnt[i] + DW'(wr) - DW'(rd);
      end
      // Column max stage.
      if (all_ne) begin
        act_t m;
        m = fifo[0][rp[0]];
        for (int i = 1; i < L; i++) m = amax(m, fifo[i][rp[i]]);
        out_valid <= 1'b1;
        out_data  <= m;
      end
    end
  end
endmodule
