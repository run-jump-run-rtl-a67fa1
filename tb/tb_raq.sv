// tb_raq: self-checking test of the Recent Access Queue at its full depth
// of 25. A reference queue of pushed IPs predicts head (the IP pushed 25
// pushes before the current one) and full after every random push.
module tb_raq;
  import jip_pkg::*;
  localparam int unsigned D = 25;
  logic clk = 0, rst_n = 0, push, full;
  cip_t push_ip, head;
  int   checks = 0, failures = 0;
  cip_t model [$];

  raq dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; push_ip = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      push    = $urandom_range(0, 2) != 0;
      push_ip = cip_t'($urandom);
      #1;
      checks++;
      if (full !== (model.size() == D)) begin
        failures++; $display("FAIL full %0b with %0d held", full, model.size());
      end
      if (model.size() == D) begin
        checks++;
        if (head !== model[0]) begin
          failures++; $display("FAIL head %h expected %h", head, model[0]);
        end
      end
      @(posedge clk);
      if (push) begin
        model.push_back(push_ip);
        if (model.size() > D) void'(model.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
