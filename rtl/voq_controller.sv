// voq_controller: sorts the frames of one switch input port into K active
// destination queues, each of which gathers a burst of frames for a single
// destination before the burst is written to the shared buffer.
//
// Input side: frames (64-bit beats, tagged with an 11-bit destination ID) go
// alternately into two Input Frame Queues: odd-numbered frames into queue 0,
// even-numbered into queue 1. When a frame's last beat is stored its ID and
// its size in beats are pushed into that queue's IP ID and SIZE queues. A
// frame's last beat is filled up to 8 bytes with 0xFF.
//
// Queue assignment (VOQs Ctrl): the two input queues are served in arrival
// order. For the next frame its ID addresses the BRAM, whose word is
// {flag, queue id}. Flag 1: the frame joins that queue. Flag 0: the head of
// the Empty Queues FIFO is taken, the BRAM word becomes {1, id}, and the
// Queue-ID Memory entry of that queue records the frame's ID. With no free
// queue, or no room in the chosen queue for the frame, the controller waits
// (`stall` is high), which back-pressures the input.
//
// Packing: each active queue has a 512-bit packer that collects eight beats
// into one word; frames of one destination are packed back to back. A queue
// issues a burst when it holds BURST_WORDS words, or when it holds data and
// no frame has joined it for FLUSH_CYCLES cycles. The partly filled packer
// word is then completed with 0xFF and the burst takes every word of the
// queue. Bursts are offered on burst_* (valid/ready) with the queue, the
// destination (from the Queue-ID Memory), the word count and the useful size
// in 8-byte beats; the writer then pops the words through wq_sel/wq_pop.
// When burst_done reports the burst written and the queue is empty, the
// queue is released: its BRAM word is cleared through the ID kept in the
// Queue-ID Memory, and its number returns to Empty Queues.
//
// Timing: one beat per cycle in and out of the queues, three cycles of
// look-up per frame. The two input queues, the flag/queue-id BRAM, the Empty
// Queues FIFO, the Queue-ID Memory, the release rule and the 0xFF padding
// follow the design description. A single clock (instead of 156/200 MHz),
// the beat-granular packing, the flush timer and the handshakes are this
// implementation's.
//
// aq_full of the active queues is not used: a frame enters a queue only
// after need_room has confirmed that the whole frame fits.
module voq_controller #(
  parameter int K            = 4,
  parameter int ID_W         = 11,
  parameter int BURST_WORDS  = 64,
  parameter int FLUSH_CYCLES = 1024,
  parameter int IQ_DEPTH     = 256,
  localparam int QW          = (K > 1) ? $clog2(K) : 1,
  localparam int AQ_DEPTH    = 2 * BURST_WORDS,
  localparam int CW          = $clog2(AQ_DEPTH + 1),
  localparam int BW          = $clog2(8 * AQ_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // Tagged frames in.
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [63:0]      s_data,
  input  logic [3:0]       s_bytes,
  input  logic             s_last,
  input  logic [ID_W-1:0]  s_id,
  // Bursts out.
  output logic             burst_valid,
  input  logic             burst_ready,
  output logic [QW-1:0]    burst_q,
  output logic [ID_W-1:0]  burst_dest,
  output logic [CW-1:0]    burst_words,
  output logic [BW-1:0]    burst_beats,
  input  logic [QW-1:0]    wq_sel,
  input  logic             wq_pop,
  output logic [511:0]     wq_data,
  input  logic             burst_done,
  input  logic [QW-1:0]    burst_done_q,
  // Events.
  output logic             ev_assign,
  output logic             ev_release,
  output logic             ev_flush,
  output logic             stall,
  output logic [K-1:0]     q_active
);
  localparam int IQW = $clog2(IQ_DEPTH + 1);
  localparam int SW  = 8;               // frame size in beats (<= 255)

  // ---------------- Input Frame Queues with IP ID and SIZE queues --------
  logic          in_sel;                // queue receiving the current frame
  logic [SW-1:0] in_beats;
  logic [1:0]    iq_full, idq_empty;
  logic [64:0]   iq_rd [2];
  logic [ID_W-1:0] idq_rd [2];
  logic [SW-1:0] szq_rd [2];
  logic [1:0]    iq_pop, idq_pop;
  logic [63:0]   padded;
  logic          s_fire;

  always_comb begin
    padded = s_data;
    for (int b = 0; b < 8; b++)
      if (b >= int'(s_bytes)) padded[b*8 +: 8] = 8'hFF;
  end
  assign s_ready = !iq_full[in_sel];
  assign s_fire  = s_valid && s_ready;

  for (genvar i = 0; i < 2; i++) begin : g_iq
    logic [IQW-1:0] unused_c0;
    logic [$clog2(IQ_DEPTH/8+1)-1:0] unused_c1, unused_c2;
    logic unused_f1, unused_f2, unused_e2, unused_e0;
    sync_fifo #(.W(65), .DEPTH(IQ_DEPTH)) u_frames (
      .clk, .rst_n, .push(s_fire && in_sel == 1'(i)), .wr_data({s_last, padded}),
      .pop(iq_pop[i]), .rd_data(iq_rd[i]), .empty(unused_e0), .full(iq_full[i]), .count(unused_c0));
    sync_fifo #(.W(ID_W), .DEPTH(IQ_DEPTH/8)) u_ipid (
      .clk, .rst_n, .push(s_fire && s_last && in_sel == 1'(i)), .wr_data(s_id),
      .pop(idq_pop[i]), .rd_data(idq_rd[i]), .empty(idq_empty[i]), .full(unused_f1), .count(unused_c1));
    sync_fifo #(.W(SW), .DEPTH(IQ_DEPTH/8)) u_size (
      .clk, .rst_n, .push(s_fire && s_last && in_sel == 1'(i)), .wr_data(in_beats + 1'b1),
      .pop(idq_pop[i]), .rd_data(szq_rd[i]), .empty(unused_e2), .full(unused_f2), .count(unused_c2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel <= 1'b0; in_beats <= '0;
    end else if (s_fire) begin
      if (s_last) begin
        in_sel   <= ~in_sel;
        in_beats <= '0;
      end else begin
        in_beats <= in_beats + 1'b1;
      end
    end
  end

  // ---------------- BRAM, Empty Queues, Queue-ID Memory ------------------
  logic [QW:0]     bram [2**ID_W];      // {flag, queue id}
  logic [ID_W-1:0] qid_mem [K];
  logic [QW-1:0]   eq [K];
  logic [QW-1:0]   eq_rp, eq_wp;
  logic [QW:0]     eq_cnt;

  // ---------------- Active destination queues and packers ----------------
  logic [511:0]    pk [K];
  logic [2:0]      pk_n [K];            // beats in the packer
  logic [K-1:0]    aq_push, aq_pop, aq_empty, aq_full;
  logic [511:0]    aq_wd [K];
  logic [511:0]    aq_rd [K];
  logic [CW-1:0]   aq_cnt [K];
  logic [BW-1:0]   q_beats [K];         // useful beats waiting in the queue
  logic [$clog2(FLUSH_CYCLES+1)-1:0] idle [K];
  logic [K-1:0]    q_busy;              // burst issued, not yet written
  logic [K-1:0]    rel_pend;

  for (genvar q = 0; q < K; q++) begin : g_aq
    sync_fifo #(.W(512), .DEPTH(AQ_DEPTH)) u_aq (
      .clk, .rst_n, .push(aq_push[q]), .wr_data(aq_wd[q]), .pop(aq_pop[q]),
      .rd_data(aq_rd[q]), .empty(aq_empty[q]), .full(aq_full[q]), .count(aq_cnt[q]));
    assign aq_pop[q] = wq_pop && wq_sel == QW'(q);
  end
  assign wq_data = aq_rd[wq_sel];

  // ---------------- Dispatcher FSM --------------------------------------
  typedef enum logic [1:0] {D_IDLE, D_READ, D_LOOK, D_XFER} dstate_e;
  dstate_e         ds;
  logic            rsel;                // input queue whose frame is next
  logic [QW:0]     bram_q;
  logic [QW-1:0]   cq;                  // queue receiving the frame
  logic [ID_W-1:0] cur_id;
  logic [SW-1:0]   cur_beats;
  logic            fl_go;               // flush/burst issue this cycle
  logic [QW-1:0]   fl_q;
  logic            need_room;

  // Words the frame may add: its beats/8 rounded up, plus one for the packer.
  assign need_room = (int'(aq_cnt[cq]) + (int'(cur_beats) + 7) / 8 + 1) > AQ_DEPTH;

  always_comb begin
    iq_pop  = '0;
    idq_pop = '0;
    if (ds == D_XFER) begin
      iq_pop[rsel] = 1'b1;
      if (iq_rd[rsel][64]) idq_pop[rsel] = 1'b1;
    end
  end

  // Burst selection: a queue with a full burst, or one that went quiet.
  logic [K-1:0] want;
  always_comb begin
    for (int q = 0; q < K; q++) begin
      logic [CW:0] words;
      words   = CW'(aq_cnt[q]) + ((pk_n[q] != 0) ? 1 : 0);
      want[q] = q_active[q] && !q_busy[q] && !(ds == D_XFER && cq == QW'(q)) &&
                ((int'(words) >= BURST_WORDS) ||
                 (words != 0 && idle[q] >= ($clog2(FLUSH_CYCLES+1))'(FLUSH_CYCLES)));
    end
    fl_go = 1'b0;
    fl_q  = '0;
    for (int q = K - 1; q >= 0; q--)
      if (want[q] && !burst_valid) begin
        fl_go = 1'b1;
        fl_q  = QW'(q);
      end
  end

  always_comb begin
    for (int q = 0; q < K; q++) begin
      aq_push[q] = 1'b0;
      aq_wd[q]   = pk[q];
      // Packer completes a word from the beat being moved now.
      if (ds == D_XFER && cq == QW'(q) && pk_n[q] == 3'd7) begin
        aq_push[q] = 1'b1;
        aq_wd[q][448 +: 64] = iq_rd[rsel][63:0];
      end else if (fl_go && fl_q == QW'(q) && pk_n[q] != 0) begin
        aq_push[q] = 1'b1;
        for (int b = 0; b < 8; b++)
          if (b >= int'(pk_n[q])) aq_wd[q][b*64 +: 64] = '1;
      end
    end
  end

  assign stall = (ds == D_LOOK) && ((!bram_q[QW] && eq_cnt == 0) ||
                                    (bram_q[QW] && need_room));

  always_ff @(posedge clk) bram_q <= bram[idq_rd[rsel]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds <= D_IDLE; rsel <= 1'b0; cq <= '0; cur_id <= '0; cur_beats <= '0;
      eq_rp <= '0; eq_wp <= '0; eq_cnt <= (QW+1)'(K);
      q_active <= '0; q_busy <= '0; rel_pend <= '0;
      burst_valid <= 1'b0; burst_q <= '0; burst_dest <= '0; burst_words <= '0; burst_beats <= '0;
      ev_assign <= 1'b0; ev_release <= 1'b0; ev_flush <= 1'b0;
      for (int q = 0; q < K; q++) begin
        eq[q] <= QW'(q); pk_n[q] <= '0; q_beats[q] <= '0; idle[q] <= '0; qid_mem[q] <= '0;
      end
      for (int a = 0; a < 2**ID_W; a++) bram[a] <= '0;
    end else begin
      ev_assign  <= 1'b0;
      ev_release <= 1'b0;
      ev_flush   <= 1'b0;
      for (int q = 0; q < K; q++)
        if (q_active[q] && idle[q] != ($clog2(FLUSH_CYCLES+1))'(FLUSH_CYCLES)) idle[q] <= idle[q] + 1'b1;

      case (ds)
        D_IDLE: begin
          // Releases are handled here so they never race a look-up.
          if (|rel_pend) begin
            for (int q = K - 1; q >= 0; q--) begin
              if (rel_pend[q]) begin
                rel_pend[q] <= 1'b0;
                if (aq_empty[q] && pk_n[q] == 0 && !q_busy[q] && !want[q]) begin
                  bram[qid_mem[q]] <= '0;
                  eq[eq_wp] <= QW'(q);
                  eq_wp <= (eq_wp == QW'(K-1)) ? '0 : eq_wp + 1'b1;
                  eq_cnt <= eq_cnt + 1'b1;
                  q_active[q] <= 1'b0;
                  ev_release <= 1'b1;
                end
                break;
              end
            end
          end else if (!idq_empty[rsel]) begin
            ds <= D_READ;                  // BRAM address = IP ID head
          end
        end
        D_READ: begin
          cur_id    <= idq_rd[rsel];
          cur_beats <= szq_rd[rsel];
          ds        <= D_LOOK;
        end
        D_LOOK: begin
          if (bram_q[QW]) begin
            cq <= bram_q[QW-1:0];
            if (!need_room) ds <= D_XFER;
          end else if (eq_cnt != 0) begin
            // Queue from Empty Queues; BRAM and Queue-ID Memory updated.
            cq <= eq[eq_rp];
            eq_rp <= (eq_rp == QW'(K-1)) ? '0 : eq_rp + 1'b1;
            eq_cnt <= eq_cnt - 1'b1;
            bram[cur_id] <= {1'b1, eq[eq_rp]};
            qid_mem[eq[eq_rp]] <= cur_id;
            q_active[eq[eq_rp]] <= 1'b1;
            idle[eq[eq_rp]] <= '0;
            ev_assign <= 1'b1;
            ds <= D_READ;                   // re-read: now a hit
          end else begin
            ds <= D_IDLE;                   // no free queue: let releases run
          end
        end
        D_XFER: begin
          pk[cq][int'(pk_n[cq])*64 +: 64] <= iq_rd[rsel][63:0];
          pk_n[cq] <= pk_n[cq] + 1'b1;
          idle[cq] <= '0;
          if (iq_rd[rsel][64]) begin
            q_beats[cq] <= q_beats[cq] + BW'(cur_beats);
            rsel <= ~rsel;
            ds <= D_IDLE;
          end
        end
        default: ds <= D_IDLE;
      endcase

      // Burst issue.
      if (fl_go) begin
        burst_valid <= 1'b1;
        burst_q     <= fl_q;
        burst_dest  <= qid_mem[fl_q];
        burst_words <= aq_cnt[fl_q] + CW'(pk_n[fl_q] != 0);
        burst_beats <= q_beats[fl_q];
        q_beats[fl_q] <= '0;
        q_busy[fl_q] <= 1'b1;
        pk_n[fl_q] <= '0;
        ev_flush <= (idle[fl_q] >= ($clog2(FLUSH_CYCLES+1))'(FLUSH_CYCLES));
      end else if (burst_valid && burst_ready) begin
        burst_valid <= 1'b0;
      end
      if (burst_done) begin
        q_busy[burst_done_q]   <= 1'b0;
        rel_pend[burst_done_q] <= 1'b1;
      end
    end
  end
endmodule
