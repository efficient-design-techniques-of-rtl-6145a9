// command_interpreter: executes the TDMA schedule sent by the control plane.
//
// The host sends a scheduling table, one 32-bit word per entry, over the
// PCIe link (rx_valid/rx_data/rx_last). The host writes words in big-endian
// byte order, so the interpreter first reverses the four bytes; the entry is
// then {timeslot[6:0], destination[10:0], vlan[5:0], wavelength[7:0]}. Each
// entry is stored at its timeslot in a table of SLOTS (80) entries; slots no
// entry names stay idle. rx_last ends the table: the schedule period becomes
// the highest timeslot received plus one and the slot sequence restarts at
// slot 0. Entries received later replace the table (all slots cleared first).
//
// Execution: every SLOT_CYCLES cycles the next slot begins (slot_start
// pulse, slot number on `slot`); for a scheduled slot the interpreter issues
// a page-read command for the slot's destination (cmd_valid until
// cmd_ready) and shows the slot's VLAN and wavelength. The period repeats
// until a new table arrives.
//
// The table fields, the 80-entry period and swapping the byte order at the
// receiving side follow the design description; the bit layout of a word,
// the slot length and the table-replacement rule are this implementation's.
module command_interpreter #(
  parameter int SLOTS       = 80,
  parameter int SLOT_CYCLES = 2048,
  parameter int ID_W        = 11,
  localparam int SW         = $clog2(SLOTS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_valid,
  input  logic [31:0]     rx_data,
  input  logic            rx_last,
  output logic            cmd_valid,
  input  logic            cmd_ready,
  output logic [ID_W-1:0] cmd_dest,
  output logic            slot_start,
  output logic [SW-1:0]   slot,
  output logic            slot_used,
  output logic [5:0]      vlan,
  output logic [7:0]      wavelength,
  output logic            running
);
  typedef struct packed {
    logic [6:0]      timeslot;
    logic [ID_W-1:0] dest;
    logic [5:0]      vlan;
    logic [7:0]      wavelength;
  } entry_t;

  entry_t          e;
  logic [SLOTS-1:0] used;
  logic [ID_W-1:0] t_dest [SLOTS];
  logic [5:0]      t_vlan [SLOTS];
  logic [7:0]      t_wl   [SLOTS];
  logic [SW:0]     period;
  logic            loading;
  logic [$clog2(SLOT_CYCLES)-1:0] tc;

  // Byte order reversal at the receiving buffer.
  assign e = entry_t'({rx_data[7:0], rx_data[15:8], rx_data[23:16], rx_data[31:24]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0; period <= '0; loading <= 1'b0; running <= 1'b0;
      tc <= '0; slot <= '0; slot_start <= 1'b0; slot_used <= 1'b0;
      cmd_valid <= 1'b0; cmd_dest <= '0; vlan <= '0; wavelength <= '0;
    end else begin
      slot_start <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (rx_valid) begin
        running <= 1'b0;
        if (int'(e.timeslot) < SLOTS) begin
          if (!loading) begin
            used   <= '0;
            period <= '0;
          end
          used[SW'(e.timeslot)]   <= 1'b1;
          t_dest[SW'(e.timeslot)] <= e.dest;
          t_vlan[SW'(e.timeslot)] <= e.vlan;
          t_wl[SW'(e.timeslot)]   <= e.wavelength;
          if (!loading || (SW+1)'(e.timeslot) >= period) period <= (SW+1)'(e.timeslot) + 1'b1;
        end
        loading <= !rx_last;
        if (rx_last) begin
          running <= 1'b1;
          tc      <= '0;
          slot    <= SW'(SLOTS - 1);      // so that the first slot is 0
        end
      end else if (running && period != 0) begin
        if (tc == '0) begin
          logic [SW-1:0] ns;
          ns = ((SW+1)'(slot) + 1'b1 >= period) ? '0 : slot + 1'b1;
          slot       <= ns;
          slot_start <= 1'b1;
          slot_used  <= used[ns];
          vlan       <= t_vlan[ns];
          wavelength <= t_wl[ns];
          if (used[ns]) begin
            cmd_valid <= 1'b1;
            cmd_dest  <= t_dest[ns];
          end
        end
        tc <= (tc == ($clog2(SLOT_CYCLES))'(SLOT_CYCLES-1)) ? '0 : tc + 1'b1;
      end
    end
  end
endmodule
