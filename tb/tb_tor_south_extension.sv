// tb_tor_south_extension: end-to-end test of the switch's upstream path.
// Seven destinations (one reached only through a MAC the table does not hold,
// so it falls to tag 0) share four active destination queues. Frames of
// random length are pushed while a schedule of 14 slots walks the
// destinations. Every page that leaves is attributed to its slot's
// destination; all-0xFF beats (burst padding) are dropped and the remaining
// beats must equal, in order, the beats sent to that destination. The useful
// size of each page, the VLAN and wavelength of each slot, and the total
// volume are checked as well. Each mechanism (queue assignment, release,
// stall for lack of a queue, flush on the quiet timer, full burst, page
// allocation, no free page, lock switch, empty slot, table miss) must occur.
module tb_tor_south_extension;
  localparam int ND = 7, PW = 32, SC = 700;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic cfg_we = 0, cfg_valid = 0;
  logic [10:0] cfg_idx = 0;
  logic [47:0] cfg_mac = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] s_data = 0;
  logic [3:0] s_bytes = 0;
  logic rx_valid = 0, rx_last = 0;
  logic [31:0] rx_data = 0;
  logic m_valid, m_last, slot_start, slot_empty, lut_miss;
  logic [511:0] m_data;
  logic [$clog2(8*PW+1)-1:0] m_useful;
  logic [6:0] slot;
  logic [5:0] vlan;
  logic [7:0] wavelength;
  logic [$clog2(16):0] free_pages;

  tor_south_extension #(.BURST_WORDS(8), .FLUSH_CYCLES(300), .PAGES(16), .PAGE_WORDS(PW),
                        .T_L(16), .SLOT_CYCLES(SC), .LUT_ENTRIES(64)) dut (.*);

  int checks = 0, failures = 0;
  int ids [ND] = '{0, 3, 17, 33, 45, 58, 63};
  logic [47:0] macs [ND];
  logic [63:0] expq [ND][$];
  int sent_beats [ND], got_beats [ND];
  int tbl_dest [14], tbl_vlan [14], tbl_wl [14];

  int n_assign = 0, n_release = 0, n_stall = 0, n_flush = 0, n_full = 0, n_alloc = 0, n_nopage = 0,
      n_lock = 0, n_empty = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_voq.ev_assign) n_assign++;
    if (dut.u_voq.ev_release) n_release++;
    if (dut.u_voq.stall && !dut.u_voq.bram_q[2]) n_stall++;
    if (dut.u_voq.ev_flush) n_flush++;
    if (dut.u_voq.burst_valid && dut.u_voq.burst_ready && dut.u_voq.burst_words >= 8) n_full++;
    if (dut.u_buf.w_go && dut.u_buf.w_need) n_alloc++;
    if (dut.u_buf.no_page) n_nopage++;
    if (dut.u_buf.lock_switch) n_lock++;
    if (slot_empty && rst_n) n_empty++;
    if (lut_miss) n_miss++;
  end

  // Lock windows: once the other side asks, the owner keeps the memory port
  // for at most T_L (16) cycles.
  int win_len = 0, max_win = 0;
  logic last_grant = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_buf.grant_wr != last_grant) win_len = 0;
    else if (dut.u_buf.grant_wr ? dut.u_buf.rs_run : dut.u_buf.ws_run) win_len++;
    if (win_len > max_win) max_win = win_len;
    last_grant = dut.u_buf.grant_wr;
  end

  // Page monitor.
  int cur_d = 0, pg_nonff = 0;
  always @(posedge clk) begin
    if (slot_start && rst_n) begin
      checks++;
      if (int'(vlan) != tbl_vlan[slot] || int'(wavelength) != tbl_wl[slot]) begin
        failures++; $display("slot %0d: vlan %0d wl %0d", slot, vlan, wavelength);
      end
      cur_d = tbl_dest[slot];
    end
    if (m_valid && rst_n) begin
      for (int b = 0; b < 8; b++) begin
        logic [63:0] beat;
        beat = m_data[b*64 +: 64];
        if (beat != '1) begin
          pg_nonff++;
          got_beats[cur_d]++;
          checks++;
          if (expq[cur_d].size() == 0 || expq[cur_d][0] != beat) begin
            failures++;
            if (failures < 10) $display("%0t dest %0d: unexpected beat %h (page %0d rpos %0d)", $time, ids[cur_d], beat, dut.u_buf.r_pg, dut.u_buf.mm_rpos[dut.u_buf.rd]);
          end
          if (expq[cur_d].size() != 0) void'(expq[cur_d].pop_front());
        end
      end
      if (m_last) begin
        checks++;
        if (int'(m_useful) != pg_nonff) begin failures++; $display("page useful %0d, counted %0d", m_useful, pg_nonff); end
        pg_nonff = 0;
      end
    end
  end

  function automatic logic [7:0] pay(int f, int k);
    return 8'((f * 37 + k * 11 + (f ^ k)) % 255);
  endfunction

  task automatic send_frame(int f, int di, int len);
    int nb = (len + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      logic [63:0] w;
      for (int k = 0; k < 8; k++) begin
        int i = b * 8 + k;
        if (i < 6)        w[k*8 +: 8] = (di == 0) ? 8'(20 + i) : macs[di][k*8 +: 8];
        else if (i < len) w[k*8 +: 8] = pay(f, i);
        else              w[k*8 +: 8] = 8'hFF;
      end
      expq[di].push_back(w);
      sent_beats[di]++;
      @(negedge clk);
      s_valid = 1; s_data = w; s_last = (b == nb - 1);
      s_bytes = (b == nb - 1) ? 4'(len - b * 8) : 4'd8;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    #(2 * 400000);
    failures++;
    $display("watchdog expired");
    $display("ws_run %0d wd %0d rs_run %0d rd %0d grant_wr %0d", dut.u_buf.ws_run, dut.u_buf.wd, dut.u_buf.rs_run, dut.u_buf.rd, dut.u_buf.grant_wr);
    for (int i = 0; i < 2048; i++) if (dut.u_buf.mm_v[i]) $display("valid list at id %0d", i);
    for (int d = 0; d < ND; d++) $display("mm_v %0d first %0d last %0d rpos %0d", dut.u_buf.mm_v[ids[d]], dut.u_buf.mm_first[ids[d]], dut.u_buf.mm_last[ids[d]], dut.u_buf.mm_rpos[ids[d]]);
    for (int d = 0; d < ND; d++) $display("dest %0d: sent %0d got %0d left %0d", ids[d], sent_beats[d], got_beats[d], expq[d].size());
    $display("assign %0d release %0d stall %0d flush %0d fullburst %0d alloc %0d nopage %0d lock %0d empty %0d miss %0d free %0d",
             n_assign, n_release, n_stall, n_flush, n_full, n_alloc, n_nopage, n_lock, n_empty, n_miss, free_pages);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f = 0;
    for (int d = 0; d < ND; d++) begin sent_beats[d] = 0; got_beats[d] = 0; end
    for (int d = 0; d < ND; d++) macs[d] = 48'h0A0B0C000000 + 48'(d * 4097);
    for (int s = 0; s < 14; s++) begin
      tbl_dest[s] = s % ND; tbl_vlan[s] = (s * 5) % 64; tbl_wl[s] = (s * 3 + 1) % 256;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // MAC table: all destinations but tag 0 (reached through a miss).
    for (int d = 1; d < ND; d++) begin
      @(negedge clk); cfg_we = 1; cfg_valid = 1; cfg_idx = 11'(ids[d]); cfg_mac = macs[d];
    end
    @(negedge clk); cfg_we = 0;
    // Phase 1: traffic before any schedule, enough to exhaust the pages.
    for (; f < 120; f++) send_frame(f, (f * 3 + f / 7) % ND, 16 + (f * 53) % 300);
    // Schedule (big-endian words).
    for (int s = 0; s < 14; s++) begin
      logic [31:0] w;
      w = {7'(s), 11'(ids[tbl_dest[s]]), 6'(tbl_vlan[s]), 8'(tbl_wl[s])};
      @(negedge clk);
      rx_valid = 1; rx_data = {w[7:0], w[15:8], w[23:16], w[31:24]}; rx_last = (s == 13);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    // Phase 2: traffic while slots run.
    for (; f < 260; f++) begin
      send_frame(f, (f * 5 + f / 3) % ND, 16 + (f * 29) % 400);
      repeat (f % 40) @(negedge clk);
    end
    // Drain.
    begin
      int left;
      do begin
        repeat (SC) @(negedge clk);
        left = 0;
        for (int d = 0; d < ND; d++) left += expq[d].size();
      end while (left != 0);
    end
    repeat (3 * SC) @(negedge clk);   // remaining slots must now be empty
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (got_beats[d] != sent_beats[d]) begin failures++; $display("dest %0d: sent %0d beats, got %0d", ids[d], sent_beats[d], got_beats[d]); end
    end
    checks++;
    if (free_pages != 16) begin failures++; $display("free pages %0d", free_pages); end
    checks++;
    if (max_win > 16) begin failures++; $display("lock window of %0d cycles", max_win); end
    $display("longest contested lock window %0d cycles", max_win);
    $display("assign %0d release %0d stall %0d flush %0d fullburst %0d alloc %0d nopage %0d lock %0d empty %0d miss %0d",
             n_assign, n_release, n_stall, n_flush, n_full, n_alloc, n_nopage, n_lock, n_empty, n_miss);
    checks++; if (n_assign == 0) failures++;
    checks++; if (n_release == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_flush == 0) failures++;
    checks++; if (n_full == 0) failures++;
    checks++; if (n_alloc == 0) failures++;
    checks++; if (n_nopage == 0) failures++;
    checks++; if (n_lock == 0) failures++;
    checks++; if (n_empty == 0) failures++;
    checks++; if (n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
