// tor_south_extension: upstream path of a top-of-rack switch for a TDMA
// optical data-center network, from one 10G server port to the page stream
// that is sent towards the optical side during the switch's time slots.
//
// Frames from the servers are tagged with an 11-bit destination ID
// (mac_id_lut), sorted into K active destination queues that gather bursts
// per destination (voq_controller), and written as bursts into a paged shared
// buffer that keeps one linked list of pages per destination
// (shared_buffer, with its Memory Map, Write FSM, Read FSM and Lock). The
// control plane's schedule arrives as a table over the host link; the
// command_interpreter walks it slot by slot and asks the Read FSM for the
// head page of each slot's destination, which leaves on m_* with its useful
// size. The Ethernet switch, the north-side TDMA framing and the vendor
// cores (10G MAC, PCIe, DDR3 controller) are outside this module: their
// signals are its ports.
//
// All of it runs on one clock. Parameters keep the defaults of the parts.
//
// The event and status outputs of the VOQ controller and the shared buffer
// (queue assignment, release, flush, stall, no free page, lock grant) and the
// slot_used/running flags of the command interpreter are left unconnected
// here: they exist for observation in simulation and for a status report
// path that is not built.
module tor_south_extension #(
  parameter int K            = 4,
  parameter int ID_W         = 11,
  parameter int BURST_WORDS  = 64,
  parameter int FLUSH_CYCLES = 1024,
  parameter int PAGES        = 64,
  parameter int PAGE_WORDS   = 256,
  parameter int T_L          = 64,
  parameter int SLOTS        = 80,
  parameter int SLOT_CYCLES  = 2048,
  parameter int LUT_ENTRIES  = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  // MAC table configuration.
  input  logic            cfg_we,
  input  logic [ID_W-1:0] cfg_idx,
  input  logic [47:0]     cfg_mac,
  input  logic            cfg_valid,
  // Frames from the servers.
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [63:0]     s_data,
  input  logic [3:0]      s_bytes,
  input  logic            s_last,
  // Schedule from the host.
  input  logic            rx_valid,
  input  logic [31:0]     rx_data,
  input  logic            rx_last,
  // Pages towards the Ethernet switch / north side.
  output logic            m_valid,
  output logic [511:0]    m_data,
  output logic            m_last,
  output logic [$clog2(8*PAGE_WORDS+1)-1:0] m_useful,
  output logic            slot_start,
  output logic [$clog2(SLOTS)-1:0] slot,
  output logic [5:0]      vlan,
  output logic [7:0]      wavelength,
  output logic            slot_empty,
  // Status.
  output logic [$clog2(PAGES):0] free_pages,
  output logic            lut_miss
);
  localparam int QW = (K > 1) ? $clog2(K) : 1;
  localparam int AQ = 2 * BURST_WORDS;
  localparam int CW = $clog2(AQ + 1);
  localparam int BW = $clog2(8 * AQ + 1);

  logic            t_valid, t_ready, t_last;
  logic [63:0]     t_data;
  logic [3:0]      t_bytes;
  logic [ID_W-1:0] t_id;

  mac_id_lut #(.ENTRIES(LUT_ENTRIES), .ID_W(ID_W)) u_lut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_mac, .cfg_valid,
    .s_valid, .s_ready, .s_data, .s_bytes, .s_last,
    .m_valid(t_valid), .m_ready(t_ready), .m_data(t_data), .m_bytes(t_bytes),
    .m_last(t_last), .m_id(t_id), .miss(lut_miss));

  logic            b_valid, b_ready, b_done, wq_pop;
  logic [QW-1:0]   b_q, wq_sel, b_done_q;
  logic [ID_W-1:0] b_dest;
  logic [CW-1:0]   b_words;
  logic [BW-1:0]   b_beats;
  logic [511:0]    wq_data;
  logic            ev_assign, ev_release, ev_flush, stall;
  logic [K-1:0]    q_active;

  voq_controller #(.K(K), .ID_W(ID_W), .BURST_WORDS(BURST_WORDS), .FLUSH_CYCLES(FLUSH_CYCLES)) u_voq (
    .clk, .rst_n, .s_valid(t_valid), .s_ready(t_ready), .s_data(t_data), .s_bytes(t_bytes),
    .s_last(t_last), .s_id(t_id),
    .burst_valid(b_valid), .burst_ready(b_ready), .burst_q(b_q), .burst_dest(b_dest),
    .burst_words(b_words), .burst_beats(b_beats), .wq_sel, .wq_pop, .wq_data,
    .burst_done(b_done), .burst_done_q(b_done_q),
    .ev_assign, .ev_release, .ev_flush, .stall, .q_active);

  logic            c_valid, c_ready;
  logic [ID_W-1:0] c_dest;
  logic            no_page, grant_wr, lock_switch, slot_used, running;

  shared_buffer #(.K(K), .ID_W(ID_W), .PAGES(PAGES), .PAGE_WORDS(PAGE_WORDS), .T_L(T_L),
                  .BURST_MAX(AQ)) u_buf (
    .clk, .rst_n, .burst_valid(b_valid), .burst_ready(b_ready), .burst_q(b_q),
    .burst_dest(b_dest), .burst_words(b_words), .burst_beats(b_beats),
    .wq_sel, .wq_pop, .wq_data, .burst_done(b_done), .burst_done_q(b_done_q),
    .cmd_valid(c_valid), .cmd_ready(c_ready), .cmd_dest(c_dest), .cmd_empty(slot_empty),
    .m_valid, .m_data, .m_last, .m_useful, .free_pages, .no_page, .grant_wr, .lock_switch);

  command_interpreter #(.SLOTS(SLOTS), .SLOT_CYCLES(SLOT_CYCLES), .ID_W(ID_W)) u_cmd (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_last,
    .cmd_valid(c_valid), .cmd_ready(c_ready), .cmd_dest(c_dest),
    .slot_start, .slot, .slot_used, .vlan, .wavelength, .running);
endmodule
