// tb_branch_filter: self-checking test of the Bloom filter that marks
// possible branch IPs (4096 bits, 4-byte step, as in the full design).
//
// A reference model keeps the set of inserted IPs. After each batch of
// random inserts, random queries check that
//   - there are no false negatives: if an inserted IP lies at or after the
//     query IP in the same line, on its 4-byte grid, the filter reports one
//     at or before the first such IP;
//   - a reported IP is on the grid, in the line and not before the query IP;
//   - the query is combinational (answer valid in the cycle the IP is set),
//     and an insert is visible from the next clock edge on.
// The false-positive rate is printed and must stay below one in four while
// the filter holds at most 64 IPs.
module tb_branch_filter;
  import jip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ins_valid, q_found;
  cip_t ins_ip, q_ip, q_first;
  int   checks = 0, failures = 0;
  int   n_q = 0, n_fp = 0;
  bit   ins_set [cip_t];

  branch_filter dut (.*);

  always #5 clk = ~clk;
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic insert(cip_t ip);
    @(negedge clk);
    ins_valid = 1; ins_ip = ip;
    @(posedge clk); #1;
    ins_valid = 0;
    ins_set[ip] = 1;
  endtask

  task automatic query(cip_t ip);
    cip_t exp;
    bit   exp_found = 0;
    @(negedge clk);
    q_ip = ip; #1;
    for (int k = 0; k < 16 && !exp_found; k++) begin
      cip_t c = ip + cip_t'(4 * k);
      if (cline_of(c) != cline_of(ip)) break;
      if (ins_set.exists(c)) begin exp_found = 1; exp = c; end
    end
    n_q++;
    checks++;
    if (exp_found && (!q_found || q_first > exp)) begin
      failures++; $display("FAIL false negative at %h: found %0b %h, inserted %h", ip, q_found, q_first, exp);
    end
    if (q_found) begin
      checks++;
      if (cline_of(q_first) != cline_of(ip) || q_first < ip || q_first[1:0] != ip[1:0]) begin
        failures++; $display("FAIL answer %h for query %h off the grid/line", q_first, ip);
      end
      if (!exp_found || q_first != exp) n_fp++;
    end
  endtask

  initial begin
    ins_valid = 0; ins_ip = '0; q_ip = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // empty filter: nothing found
    query(25'h0_1000);
    checks++;
    if (q_found) begin failures++; $display("FAIL empty filter found %h", q_first); end
    // directed: a branch two instructions into a line
    insert(25'h1_2348);
    query(25'h1_2340);
    checks++;
    if (!q_found || q_first != 25'h1_2348) begin
      failures++; $display("FAIL directed query: %0b %h", q_found, q_first);
    end
    // random inserts in a small address range so queries meet them
    for (int batch = 0; batch < 8; batch++) begin
      for (int i = 0; i < 8; i++) insert(25'h0_8000 + cip_t'(64 * $urandom_range(0, 63)) + cip_t'(4 * $urandom_range(0, 15)));
      for (int i = 0; i < 200; i++) query(25'h0_8000 + cip_t'(4 * $urandom_range(0, 1023)));
    end
    $display("queries %0d, false positives %0d", n_q, n_fp);
    checks++;
    if (n_fp * 4 > n_q) begin failures++; $display("FAIL false-positive rate too high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
