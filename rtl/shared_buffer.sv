// shared_buffer: the paged shared buffer of the switch with its Memory Map,
// Unused Pages list, Write FSM, Read FSM and Lock.
//
// Organisation: the buffer is cut into PAGES pages of PAGE_WORDS 512-bit
// words; the pages of one destination form a linked list used as a queue.
// The Memory Map keeps, for every destination ID, the first page (being
// read), the last page (being written), the writing position in the last
// page, the reading position in the first page, the useful size (in 8-byte
// beats) and the size (in words) of all its data. Per page it keeps the next
// page of the list, the words written and the useful beats. Free pages wait
// in the Unused Pages FIFO.
//
// Write FSM: accepts a burst (burst_valid/burst_ready: destination, words,
// useful beats), then, in write windows of the Lock, pops one word per cycle
// from the active destination queue (wq_sel/wq_pop/wq_data) and stores it at
// the writing position of the destination's last page. When there is no
// page or the last page is full it takes a page from Unused Pages and links
// it behind the last page. burst_done/burst_done_q report the end of the
// burst. With no unused page the writer waits (no_page is high).
//
// Read FSM: a command (cmd_valid/cmd_ready, cmd_dest) asks for the first
// page of a destination. In read windows it reads one word per cycle from
// the reading position on; words leave on m_* one cycle after their read.
// The word that exhausts the page's written words closes the page: m_last
// is set, m_useful gives the page's useful beats, the page returns to Unused
// Pages and the list advances (or becomes empty). A destination with no data
// gives a cmd_empty pulse instead. Because the reading position is stored, a
// page read interrupted by a write window resumes where it stopped, and a
// list may be written and read in alternate windows.
//
// Lock: lock_arbiter gives the single memory port to writing or reading in
// windows of T_L cycles.
//
// The pointer set, the page lists, the free list and the Lock follow the
// design description; page size, number of pages, counting useful size in
// 8-byte beats and closing a partly written head page when it is read are
// this implementation's choices.
module shared_buffer #(
  parameter int K          = 4,
  parameter int ID_W       = 11,
  parameter int PAGES      = 64,
  parameter int PAGE_WORDS = 256,
  parameter int T_L        = 64,
  parameter int BURST_MAX  = 128,
  localparam int QW        = (K > 1) ? $clog2(K) : 1,
  localparam int CW        = $clog2(BURST_MAX + 1),
  localparam int BW        = $clog2(8 * BURST_MAX + 1),
  localparam int PGW       = $clog2(PAGES),
  localparam int PWW       = $clog2(PAGE_WORDS + 1),
  localparam int UBW       = $clog2(8 * PAGE_WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // Bursts from the VOQ controller.
  input  logic             burst_valid,
  output logic             burst_ready,
  input  logic [QW-1:0]    burst_q,
  input  logic [ID_W-1:0]  burst_dest,
  input  logic [CW-1:0]    burst_words,
  input  logic [BW-1:0]    burst_beats,
  output logic [QW-1:0]    wq_sel,
  output logic             wq_pop,
  input  logic [511:0]     wq_data,
  output logic             burst_done,
  output logic [QW-1:0]    burst_done_q,
  // Page read commands and page stream.
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic [ID_W-1:0]  cmd_dest,
  output logic             cmd_empty,
  output logic             m_valid,
  output logic [511:0]     m_data,
  output logic             m_last,
  output logic [UBW-1:0]   m_useful,
  // Status and events.
  output logic [PGW:0]     free_pages,
  output logic             no_page,
  output logic             grant_wr,
  output logic             lock_switch
);
  localparam int DESTS = 2 ** ID_W;
  localparam int AW    = $clog2(PAGES * PAGE_WORDS);

  // ---------------- Memory Map ----------------
  logic [DESTS-1:0] mm_v;
  logic [PGW-1:0]   mm_first [DESTS];
  logic [PGW-1:0]   mm_last  [DESTS];
  logic [PWW-1:0]   mm_wpos  [DESTS];
  logic [PWW-1:0]   mm_rpos  [DESTS];
  logic [31:0]      mm_useful [DESTS];
  logic [31:0]      mm_size  [DESTS];
  logic [PGW-1:0]   pg_next  [PAGES];
  logic [PWW-1:0]   pg_words [PAGES];
  logic [UBW-1:0]   pg_useful [PAGES];

  // ---------------- Unused Pages ----------------
  logic [PGW-1:0]   fp [PAGES];
  logic [PGW-1:0]   fp_rp, fp_wp;

  // ---------------- Shared memory port ----------------
  logic             mem_we;
  logic [AW-1:0]    mem_addr;
  logic [511:0]     mem_rdata;
  shared_memory #(.PAGES(PAGES), .PAGE_WORDS(PAGE_WORDS), .W(512)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(wq_data), .rdata(mem_rdata));

  // ---------------- Lock ----------------
  logic ws_run, rs_run;
  lock_arbiter #(.T_L(T_L)) u_lock (
    .clk, .rst_n, .wr_req(ws_run), .rd_req(rs_run), .grant_wr, .switched(lock_switch));

  // ---------------- Write FSM ----------------
  logic [ID_W-1:0] wd;
  logic [CW-1:0]   wleft;
  logic [BW-1:0]   wbeats;
  logic            w_need, w_go;
  logic [PGW-1:0]  w_pg;
  logic [PWW-1:0]  w_pos;
  logic [3:0]      w_ub;

  assign burst_ready = !ws_run;
  assign wq_sel      = burst_done_q;
  assign w_need      = !mm_v[wd] || mm_wpos[wd] == PWW'(PAGE_WORDS);
  assign no_page     = ws_run && grant_wr && w_need && free_pages == 0;
  assign w_go        = ws_run && grant_wr && !no_page;
  assign w_pg        = w_need ? fp[fp_rp] : mm_last[wd];
  assign w_pos       = w_need ? '0 : mm_wpos[wd];
  assign w_ub        = (wbeats > BW'(8)) ? 4'd8 : 4'(wbeats);
  assign wq_pop      = w_go;

  // ---------------- Read FSM ----------------
  logic [ID_W-1:0] rd;
  logic            r_go, r_end;
  logic [PGW-1:0]  r_pg;
  assign cmd_ready = !rs_run;
  assign r_pg      = mm_first[rd];
  assign r_go      = rs_run && !grant_wr;
  assign r_end     = (mm_rpos[rd] + 1'b1) == pg_words[r_pg];

  always_comb begin
    mem_we   = w_go;
    mem_addr = w_go ? AW'(w_pg * PAGE_WORDS + w_pos) : AW'(r_pg * PAGE_WORDS + mm_rpos[rd]);
  end

  logic rv_q, rl_q;
  logic [UBW-1:0] ru_q;
  assign m_valid  = rv_q;
  assign m_last   = rl_q;
  assign m_useful = ru_q;
  assign m_data   = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mm_v <= '0;
      for (int p = 0; p < PAGES; p++) fp[p] <= PGW'(p);
      fp_rp <= '0; fp_wp <= '0; free_pages <= (PGW+1)'(PAGES);
      ws_run <= 1'b0; wd <= '0; wleft <= '0; wbeats <= '0; burst_done <= 1'b0; burst_done_q <= '0;
      rs_run <= 1'b0; rd <= '0; cmd_empty <= 1'b0; rv_q <= 1'b0; rl_q <= 1'b0; ru_q <= '0;
    end else begin
      burst_done <= 1'b0;
      cmd_empty  <= 1'b0;
      rv_q       <= 1'b0;
      rl_q       <= 1'b0;
      // Write FSM.
      if (!ws_run) begin
        if (burst_valid) begin
          ws_run <= 1'b1; wd <= burst_dest; wleft <= burst_words; wbeats <= burst_beats;
          burst_done_q <= burst_q;
        end
      end else if (w_go) begin
        if (w_need) begin
          fp_rp <= fp_rp + 1'b1;
          if (mm_v[wd]) pg_next[mm_last[wd]] <= w_pg;
          else begin
            mm_first[wd] <= w_pg;
            mm_rpos[wd]  <= '0;
            mm_useful[wd] <= '0;
            mm_size[wd]  <= '0;
          end
          mm_last[wd]    <= w_pg;
          mm_v[wd]       <= 1'b1;
          pg_words[w_pg] <= PWW'(1);
          pg_useful[w_pg] <= UBW'(w_ub);
        end else begin
          pg_words[w_pg]  <= pg_words[w_pg] + 1'b1;
          pg_useful[w_pg] <= pg_useful[w_pg] + UBW'(w_ub);
        end
        mm_wpos[wd] <= w_pos + 1'b1;
        if (mm_v[wd]) begin
          mm_useful[wd] <= mm_useful[wd] + 32'(w_ub);
          mm_size[wd]   <= mm_size[wd] + 1;
        end else begin
          mm_useful[wd] <= 32'(w_ub);
          mm_size[wd]   <= 1;
        end
        wbeats <= wbeats - BW'(w_ub);
        wleft  <= wleft - 1'b1;
        if (wleft == CW'(1)) begin
          ws_run <= 1'b0;
          burst_done <= 1'b1;
        end
      end
      // Read FSM.
      if (!rs_run) begin
        if (cmd_valid) begin
          rd <= cmd_dest;
          if (mm_v[cmd_dest]) rs_run <= 1'b1;
          else                cmd_empty <= 1'b1;
        end
      end else if (r_go) begin
        rv_q <= 1'b1;
        if (r_end) begin
          rl_q <= 1'b1;
          ru_q <= pg_useful[r_pg];
          rs_run <= 1'b0;
          fp[fp_wp] <= r_pg;
          fp_wp <= fp_wp + 1'b1;
          mm_useful[rd] <= mm_useful[rd] - 32'(pg_useful[r_pg]);
          mm_size[rd]   <= mm_size[rd] - 32'(pg_words[r_pg]);
          mm_rpos[rd]   <= '0;
          if (r_pg == mm_last[rd]) mm_v[rd] <= 1'b0;
          else                     mm_first[rd] <= pg_next[r_pg];
        end else begin
          mm_rpos[rd] <= mm_rpos[rd] + 1'b1;
        end
      end
      free_pages <= free_pages - (PGW+1)'(w_go && w_need) + (PGW+1)'(r_go && r_end);
    end
  end
endmodule
