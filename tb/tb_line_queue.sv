// tb_line_queue: self-checking test of the line FIFO used as RPQ and LAPRQ.
// A reference model (a SystemVerilog queue of the last ENTRIES pushed lines,
// minus cleared ones) predicts every chk_hit; random pushes, checks and
// clears run for 2000 cycles on an 8-entry queue.
module tb_line_queue;
  import jip_pkg::*;
  localparam int unsigned N = 8;
  logic   clk = 0, rst_n = 0;
  cline_t chk_line, push_line;
  logic   chk_hit, clr_hit, push;
  int     checks = 0, failures = 0;

  line_queue #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: slot-accurate copy of the ring
  cline_t m_line [N];
  logic   m_valid [N];
  int     m_wp;

  function automatic logic m_hit(cline_t l, output int idx);
    idx = -1;
    for (int i = 0; i < N; i++) if (m_valid[i] && m_line[i] == l && idx < 0) idx = i;
    return idx >= 0;
  endfunction

  initial begin
    int idx;
    logic exp;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    m_wp = 0;
    push = 0; clr_hit = 0; chk_line = '0; push_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: fill, then one more evicts the oldest
    for (int i = 0; i < N + 1; i++) begin
      @(negedge clk); push = 1; push_line = cline_t'(100 + i);
      @(posedge clk); #1; push = 0;
    end
    @(negedge clk); chk_line = cline_t'(100);
    #1; checks++; if (chk_hit) begin failures++; $display("FAIL oldest line not evicted"); end
    chk_line = cline_t'(100 + N);
    #1; checks++; if (!chk_hit) begin failures++; $display("FAIL newest line missing"); end
    chk_line = cline_t'(101);
    #1; checks++; if (!chk_hit) begin failures++; $display("FAIL second line missing"); end
    // set model to match: lines 100+N at slot 0, 101..100+N-1 at slots 1..N-1
    for (int i = 0; i < N; i++) begin m_valid[i] = 1; m_line[i] = cline_t'(100 + (i == 0 ? N : i)); end
    m_wp = 1;
    // random
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      chk_line  = cline_t'($urandom_range(0, 15));
      push      = $urandom_range(0, 1);
      push_line = cline_t'($urandom_range(0, 15));
      clr_hit   = ($urandom_range(0, 3) == 0);
      #1;
      exp = m_hit(chk_line, idx);
      checks++;
      if (chk_hit !== exp) begin
        failures++;
        $display("FAIL cycle %0d line %0d hit %0b expected %0b", c, chk_line, chk_hit, exp);
      end
      @(posedge clk);
      if (clr_hit && exp) m_valid[idx] = 0;
      if (push) begin m_line[m_wp] = push_line; m_valid[m_wp] = 1; m_wp = (m_wp + 1) % N; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
