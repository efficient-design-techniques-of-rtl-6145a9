// feature_map_input: the Second Input Layer of the CNN. The pooled values of
// the first layer arrive one per valid cycle, a whole IMG x IMG feature map
// after another in row-major order. The Input Rows FSM gathers IMG values
// into a row register and writes the full row into the Feature Map Block RAM
// of a window generator; when the last row of a map is stored, the generator
// is started for one pass over that map and emits its K x K windows, one per
// cycle, tagged with the map number.
//
// The RAM has two banks used alternately (map m in bank m mod 2), so the next
// map can be written while the previous one is being scanned; a map that is
// complete while the generator is still busy waits in a one-deep pending
// slot. `win_last` marks the last window of each map. The Input Rows FSM and
// the row-wide RAM follow the design description; the ping-pong banks and
// the pending slot are this implementation's choices.
module feature_map_input
  import cnn_pkg::*;
#(
  parameter int IMG = 19,
  parameter int K   = 4,
  parameter int NM  = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  act_t                    in_data,
  output logic                    busy,
  output logic                    win_valid,
  output logic [K*K*ACT_W-1:0]    win,
  output logic [$clog2(NM)-1:0]   win_map,
  output logic                    win_last
);
  localparam int CW = $clog2(IMG);
  localparam int MW = $clog2(NM);

  logic [IMG*ACT_W-1:0] rowbuf;
  logic [CW-1:0]        col, row;
  logic [MW-1:0]        wmap;          // map being written
  logic                 wr_en;
  logic [IMG*ACT_W-1:0] wr_data;
  logic [$clog2(2*IMG)-1:0] wr_addr;
  logic                 pend;
  logic [MW-1:0]        pend_map;
  logic [MW-1:0]        gen_map;
  logic                 wg_busy, go;
  logic [7:0]           unused_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; wmap <= '0; wr_en <= 1'b0; pend <= 1'b0;
      pend_map <= '0; gen_map <= '0;
    end else begin
      wr_en <= 1'b0;
      if (in_valid) begin
        rowbuf[col*ACT_W +: ACT_W] <= in_data;
        if (col == CW'(IMG-1)) begin
          col     <= '0;
          wr_en   <= 1'b1;
          wr_addr <= ($clog2(2*IMG))'(wmap[0] * IMG + row);
          if (row == CW'(IMG-1)) begin
            row <= '0;
            wmap <= wmap + 1'b1;
            pend <= 1'b1;           // map complete once this row is written
            pend_map <= wmap;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
      if (go) begin
        pend    <= 1'b0;
        gen_map <= pend_map;
      end
    end
  end

  assign wr_data = rowbuf;

  // Start the generator once the final row has been written (pend is set in
  // the same cycle as that write is issued, so wait for wr_en to drop).
  assign go = pend && !wg_busy && !wr_en;

  window_generator #(.IMG(IMG), .K(K), .DW(ACT_W), .BANKS(2)) u_wg (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data,
    .start(go), .start_bank(2'(pend_map[0])), .npass(8'd1),
    .busy(wg_busy), .win_valid, .win, .win_pass(unused_pass), .win_last);

  assign win_map = gen_map;
  assign busy    = pend | wg_busy | (col != 0) | (row != 0) | wr_en;
endmodule
