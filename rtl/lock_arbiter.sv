// lock_arbiter: the Lock of the shared buffer. Time is cut into windows of
// T_L cycles and each window belongs either to writing (bursts from the
// active destination queues) or to reading (pages for the TDMA slots), so
// the single buffer port serves long bursts of one kind at a time.
//
// Rule: at the end of a window the grant passes to the other side if that
// side is requesting; otherwise the owner keeps it for another window. If
// the owner has nothing to do while the other side waits, the grant passes at
// once instead of idling to the end of the window. grant_wr is 1 for a write
// window, 0 for a read window; `switched` pulses when the owner changes.
// Windows of T_L cycles come from the design description; the pass-early
// rule and the reset owner (write) are this implementation's choices.
module lock_arbiter #(
  parameter int T_L = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_req,
  input  logic rd_req,
  output logic grant_wr,
  output logic switched
);
  logic [$clog2(T_L)-1:0] t;
  logic other_req, own_req, flip;

  assign own_req   = grant_wr ? wr_req : rd_req;
  assign other_req = grant_wr ? rd_req : wr_req;
  assign flip      = other_req && (!own_req || t == ($clog2(T_L))'(T_L-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_wr <= 1'b1; t <= '0; switched <= 1'b0;
    end else begin
      switched <= flip;
      if (flip) begin
        grant_wr <= ~grant_wr;
        t <= '0;
      end else begin
        t <= (t == ($clog2(T_L))'(T_L-1)) ? '0 : t + 1'b1;
      end
    end
  end
endmodule
