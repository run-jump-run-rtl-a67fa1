// tb_temporal_table: self-checking test of the temporal table (6 entries).
// The model is an associative array leader -> follower. After every insert
// all leaders are probed on the lookup port: each must hit with its latest
// follower, except that an insert of a new leader into a full table must
// have evicted exactly one earlier leader (random replacement), which then
// leaves the model. Re-inserting a held leader must update it in place.
module tb_temporal_table;
  import jip_pkg::*;
  localparam int unsigned N = 6;
  logic clk = 0, rst_n = 0;
  logic lk_valid, lk_hit, ins_valid;
  cip_t lk_leader, lk_follower, ins_leader, ins_follower;
  int   checks = 0, failures = 0, evictions = 0, updates = 0;
  cip_t model [cip_t];
  int   victim_seen [cip_t];

  temporal_table #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cip_t l, f, gone;
    int   missing;
    bit   was_held, full_before;
    lk_valid = 0; ins_valid = 0; lk_leader = '0; ins_leader = '0; ins_follower = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lk_valid = 1; lk_leader = 25'h5; #1;
    checks++; if (lk_hit) begin failures++; $display("FAIL hit in empty table"); end
    for (int c = 0; c < 600; c++) begin
      l = cip_t'($urandom_range(1, 14) * 25'h40);
      f = cip_t'($urandom);
      was_held    = model.exists(l);
      full_before = model.num() == N;
      @(negedge clk);
      ins_valid = 1; ins_leader = l; ins_follower = f;
      @(posedge clk); #1;
      ins_valid = 0;
      model[l] = f;
      if (was_held) updates++;
      // probe every leader
      missing = 0;
      foreach (model[k]) begin
        lk_leader = k; #1;
        checks++;
        if (!lk_hit) begin
          missing++; gone = k;
        end else if (lk_follower !== model[k]) begin
          failures++; $display("FAIL leader %h follower %h expected %h", k, lk_follower, model[k]);
        end
      end
      checks++;
      if (!was_held && full_before) begin
        if (missing != 1 || gone == l) begin
          failures++; $display("FAIL %0d leaders missing after a replacement", missing);
        end else begin
          model.delete(gone); evictions++;
        end
      end else if (missing != 0) begin
        failures++; $display("FAIL %0d leaders missing without replacement", missing);
      end
    end
    checks++;
    if (evictions < 50 || updates < 50) begin
      failures++; $display("FAIL coverage: %0d evictions %0d updates", evictions, updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
