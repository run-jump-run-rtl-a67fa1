// raq: Recent Access Queue, the IPs of the last DEPTH (25) L1-I accesses.
//
// Every L1-I access pushes its compressed IP; once DEPTH IPs are held, the
// oldest one drops out. head is the oldest IP held, the access DEPTH accesses
// before the one being pushed: it is the leader IP that the temporal table
// pairs with a missing access. full says DEPTH IPs are held, so head is
// meaningful. The 25 entries of 25 bits are published; the shift-register
// form and the fill counter are this design's. head and full are read
// before the push of the same cycle takes effect.
module raq
  import jip_pkg::*;
#(
  parameter int unsigned DEPTH = 25
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  cip_t push_ip,
  output cip_t head,
  output logic full
);
  cip_t q [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign head = q[0];
  assign full = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (push) begin
      if (full) begin
        for (int unsigned i = 0; i + 1 < DEPTH; i++) q[i] <= q[i+1];
        q[DEPTH-1] <= push_ip;
      end else begin
        q[cnt_q] <= push_ip;
        cnt_q    <= cnt_q + 1'b1;
      end
    end
  end

endmodule
