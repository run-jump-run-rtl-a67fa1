// tb_ip_mapper: self-checking test of the mapper table (8 entries here).
// A behavioural model keeps the table of upper-48-bit values and the FIFO
// pointer; random accesses on both compress ports draw their upper bits
// from a pool of 12 values so that hits, misses, shared misses and FIFO
// replacement all occur. Every compressed IP is checked against the model,
// and every compressed IP is decompressed on the reverse port right away and
// must give back the original IP.
module tb_ip_mapper;
  import jip_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic a_valid, b_valid, a_miss;
  ip_t  a_ip, b_ip, r_ip;
  cip_t a_cip, b_cip, r_cip;
  int   checks = 0, failures = 0;
  int   allocs = 0;

  ip_mapper #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [47:0] m_up [N];
  logic        m_v  [N];
  int          m_ptr;

  function automatic int m_find(logic [47:0] u);
    for (int i = 0; i < N; i++) if (m_v[i] && m_up[i] == u) return i;
    return -1;
  endfunction

  function automatic logic [47:0] pool(int k);
    return 48'h7f00_0000_0000 + 48'(k) * 48'h1_0003;
  endfunction

  initial begin
    int ia, ib, ea, eb, pa, pb;
    for (int i = 0; i < N; i++) m_v[i] = 0;
    m_ptr = 0;
    a_valid = 0; b_valid = 0; a_ip = '0; b_ip = '0; r_cip = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      a_valid = $urandom_range(0, 3) != 0;
      b_valid = $urandom_range(0, 1);
      a_ip = {pool($urandom_range(0, 11)), 16'($urandom)};
      b_ip = ($urandom_range(0, 3) == 0) ? {a_ip[63:16], 16'($urandom)}
                                         : {pool($urandom_range(0, 11)), 16'($urandom)};
      #1;
      // model
      pa = m_ptr; ea = -1; eb = -1;
      if (a_valid) begin
        ia = m_find(a_ip[63:16]);
        if (ia < 0) begin ea = m_ptr; m_ptr = (m_ptr + 1) % N; end
        else ea = ia;
      end
      if (b_valid) begin
        ib = m_find(b_ip[63:16]);
        if (a_valid && ia < 0 && ib == pa) ib = -1;   // about to be overwritten by a
        if (ib >= 0) eb = ib;
        else if (a_valid && a_ip[63:16] == b_ip[63:16]) eb = ea;
        else begin
          eb = m_ptr;
          if (a_valid && ia >= 0 && ia == eb) eb = (eb + 1) % N;   // spare a's entry
          m_ptr = (eb + 1) % N;
        end
      end
      if (a_valid) begin
        checks++;
        if (a_cip !== {9'(ea), a_ip[15:0]} || a_miss !== (ia < 0)) begin
          failures++; $display("FAIL a: %h expected idx %0d got %h", a_ip, ea, a_cip);
        end
        if (ia < 0) allocs++;
      end
      if (b_valid) begin
        checks++;
        if (b_cip !== {9'(eb), b_ip[15:0]}) begin
          failures++; $display("FAIL b: %h expected idx %0d got %h", b_ip, eb, b_cip);
        end
      end
      @(posedge clk);
      if (a_valid && ia < 0) begin m_up[ea] = a_ip[63:16]; m_v[ea] = 1; end
      if (b_valid && eb >= 0 && m_find(b_ip[63:16]) < 0) begin m_up[eb] = b_ip[63:16]; m_v[eb] = 1; end
      // reverse mapping of what was just compressed
      if (a_valid) begin
        #1; r_cip = a_cip; #1;
        checks++;
        if (r_ip !== a_ip) begin failures++; $display("FAIL reverse %h gave %h", a_ip, r_ip); end
      end
    end
    checks++;
    if (allocs < 50) begin failures++; $display("FAIL only %0d allocations", allocs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
