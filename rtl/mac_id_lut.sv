// mac_id_lut: the MAC-to-ID look-up table at the switch input. Each frame
// arriving from a server is tagged with a short destination ID (ID_W = 11
// bits) so that the rest of the switch addresses destinations with 11 bits
// instead of 48-bit MAC addresses.
//
// How it works: the table is a content-addressable array of ENTRIES MAC
// addresses; entry i, written by the control side through cfg_*, holds the
// MAC of destination ID i. On the first beat of a frame the destination MAC
// (bytes 0..5 of the frame, bits [47:0] of the first 64-bit beat) is
// compared with every valid entry; the matching index becomes the frame's
// tag, held for all its beats. A MAC that matches nothing gets tag 0 and
// raises `miss` for one cycle.
//
// Stream interface: valid/ready, 64-bit data, `bytes` (valid bytes of the
// beat, 1..8) and `last`; one register stage, so a beat leaves one cycle
// after it is accepted; full rate. Only the tagging function comes from the
// design description; the CAM organisation and miss rule are this
// implementation's.
module mac_id_lut #(
  parameter int ENTRIES = 2048,
  parameter int ID_W    = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [ID_W-1:0] cfg_idx,
  input  logic [47:0]     cfg_mac,
  input  logic            cfg_valid,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [63:0]     s_data,
  input  logic [3:0]      s_bytes,
  input  logic            s_last,
  output logic            m_valid,
  input  logic            m_ready,
  output logic [63:0]     m_data,
  output logic [3:0]      m_bytes,
  output logic            m_last,
  output logic [ID_W-1:0] m_id,
  output logic            miss
);
  logic [47:0]        mac [ENTRIES];
  logic [ENTRIES-1:0] ent_v;
  logic               first;      // next accepted beat starts a frame
  logic [ID_W-1:0]    hit_id, cur_id;
  logic               hit;

  always_comb begin
    hit = 1'b0;
    hit_id = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (!hit && ent_v[i] && mac[i] == s_data[47:0]) begin
        hit = 1'b1;
        hit_id = ID_W'(i);
      end
  end

  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk) if (cfg_we) mac[cfg_idx] <= cfg_mac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_v <= '0; first <= 1'b1; m_valid <= 1'b0; cur_id <= '0; miss <= 1'b0;
      m_data <= '0; m_bytes <= '0; m_last <= 1'b0; m_id <= '0;
    end else begin
      miss <= 1'b0;
      if (cfg_we) ent_v[cfg_idx] <= cfg_valid;
      if (s_ready) m_valid <= s_valid;
      if (s_valid && s_ready) begin
        m_data  <= s_data;
        m_bytes <= s_bytes;
        m_last  <= s_last;
        first   <= s_last;
        if (first) begin
          cur_id <= hit ? hit_id : '0;
          m_id   <= hit ? hit_id : '0;
          miss   <= !hit;
        end else begin
          m_id <= cur_id;
        end
      end
    end
  end
endmodule
