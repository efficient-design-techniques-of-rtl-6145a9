// window_generator: the CNN Input Block. It holds one image channel (or one
// feature map) in a Block RAM whose word is a whole row, so that one row is
// read per cycle, and turns it into a stream of K x K windows, one per cycle.
//
// How it works: a Kernel Window Controller FSM (the "loader") reads K
// consecutive rows into one of two sets of K shift registers, each register a
// full row. While one set is being loaded, the other set shifts by one pixel
// per cycle and its first K pixels of every row form the window (the
// "decoder"). With IMG-K+1 >= K+1 the sets alternate without a bubble, so all
// (IMG-K+1)^2 windows of a pass leave in back-to-back cycles after a start-up
// latency of K+2 cycles. A start with npass > 1 repeats the pass (the first
// convolution layer walks the same image once per filter); passes also follow
// each other without a bubble. Windows are valid-only: there is no
// backpressure, the consumer must take one window per cycle.
//
// Interface: rows are written through wr_en/wr_addr/wr_data (row r of bank b
// at address b*IMG+r; pixel c at bits [c*DW +: DW]). start (ignored while
// busy) begins npass passes over bank start_bank. win holds pixel (r,c) of
// the window at bits [(r*K+c)*DW +: DW]; win_pass is the pass index, win_last
// marks the last window of the last pass.
//
// The double set of shift registers, the row-wide RAM and the one-window-per-
// cycle rate follow the design description; the banked RAM (BANKS > 1, used
// as a ping-pong feature-map buffer) and the start/npass control are choices
// of this implementation.
module window_generator #(
  parameter int IMG   = 80,
  parameter int K     = 5,
  parameter int DW    = 8,
  parameter int BANKS = 1,
  parameter int PW    = 8           // width of the pass counter
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(BANKS*IMG)-1:0] wr_addr,
  input  logic [IMG*DW-1:0]         wr_data,
  input  logic                      start,
  input  logic [$clog2(BANKS+1)-1:0] start_bank,
  input  logic [PW-1:0]             npass,
  output logic                      busy,
  output logic                      win_valid,
  output logic [K*K*DW-1:0]         win,
  output logic [PW-1:0]             win_pass,
  output logic                      win_last
);
  localparam int OUT = IMG - K + 1;
  localparam int AW  = $clog2(BANKS*IMG);
  localparam int RW  = $clog2(IMG + 1);
  localparam int KW  = $clog2(K + 1);
  localparam int IW  = (K > 1) ? $clog2(K) : 1;   // index of a row register

  // Row-wide Block RAM, synchronous read.
  logic [IMG*DW-1:0] mem [BANKS*IMG];
  logic [IMG*DW-1:0] rd_q;
  logic [AW-1:0]     rd_addr;
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_q <= mem[rd_addr];
  end

  // Two sets of K row shift registers.
  logic [IMG*DW-1:0] sh [2][K];
  logic [1:0]        ready;
  logic [PW-1:0]     set_pass [2];
  logic [1:0]        set_last;     // set holds the final row of the final pass

  // Loader (Kernel Window Controller FSM).
  logic              ld_run;
  logic              ld_set;
  logic [RW-1:0]     ld_row;       // output row being prepared
  logic [PW-1:0]     ld_pass;
  logic [KW-1:0]     ld_i;         // row within the window being requested
  logic              rd_v;         // a read issued last cycle
  logic [KW-1:0]     rd_i;
  logic [AW-1:0]     base;
  logic [PW-1:0]     np;

  // Shifter.
  logic              sh_set;
  logic [RW-1:0]     col;

  assign rd_addr = AW'(base + AW'(ld_row) + AW'(ld_i));
  assign busy    = ld_run | rd_v | (|ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_run <= 1'b0; ld_set <= 1'b0; ld_row <= '0; ld_pass <= '0; ld_i <= '0;
      rd_v <= 1'b0; rd_i <= '0; base <= '0; np <= '0;
      ready <= '0; set_last <= '0; sh_set <= 1'b0; col <= '0;
      for (int s = 0; s < 2; s++) set_pass[s] <= '0;
    end else begin
      rd_v <= 1'b0;
      if (start && !busy && npass != 0) begin
        ld_run  <= 1'b1;
        ld_set  <= 1'b0;
        sh_set  <= 1'b0;
        ld_row  <= '0;
        ld_pass <= '0;
        ld_i    <= '0;
        col     <= '0;
        np      <= npass;
        base    <= AW'(start_bank * IMG);
      end else if (ld_run && !ready[ld_set] && !(rd_v && rd_i == KW'(K-1))) begin
        // Request row ld_row+ld_i of the current window set.
        rd_v <= 1'b1;
        rd_i <= ld_i;
        if (ld_i == KW'(K-1)) begin
          ld_i <= '0;
        end else begin
          ld_i <= ld_i + 1'b1;
        end
      end
      // Data of the read issued last cycle lands in the loading set.
      if (rd_v) begin
        sh[ld_set][IW'(rd_i)] <= rd_q;
        if (rd_i == KW'(K-1)) begin
          ready[ld_set]    <= 1'b1;
          set_pass[ld_set] <= ld_pass;
          set_last[ld_set] <= (ld_row == RW'(OUT-1)) && (ld_pass == np - 1'b1);
          ld_set           <= ~ld_set;
          if (ld_row == RW'(OUT-1)) begin
            ld_row <= '0;
            if (ld_pass == np - 1'b1) ld_run <= 1'b0;
            else                      ld_pass <= ld_pass + 1'b1;
          end else begin
            ld_row <= ld_row + 1'b1;
          end
        end
      end
      // Shifter: one window per cycle out of the ready set.
      if (ready[sh_set]) begin
        for (int r = 0; r < K; r++) sh[sh_set][r] <= sh[sh_set][r] >> DW;
        if (col == RW'(OUT-1)) begin
          col           <= '0;
          ready[sh_set] <= 1'b0;
          sh_set        <= ~sh_set;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb begin
    win_valid = ready[sh_set];
    win_pass  = set_pass[sh_set];
    win_last  = ready[sh_set] && set_last[sh_set] && (col == RW'(OUT-1));
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win[(r*K+c)*DW +: DW] = sh[sh_set][r][c*DW +: DW];
  end
endmodule
