// bloom_filter_tb: inserts random keys into the 8-bit, 4-transform Bloom
// filter and checks, against a model of the hash transforms kept here, the
// filter vector after every insert and the answer to every query: an
// inserted key must always be reported as a member, and a key is reported
// exactly when all its bits are set. It counts false positives, checks the
// one-cycle query latency and clearing.
module bloom_filter_tb;

  int checks = 0, failures = 0;
  int n_fp = 0, n_true = 0, n_neg = 0;

  logic clk = 0, rst_n = 0;
  logic clear, insert, query;
  logic [7:0] ins_key, q_key;
  logic q_valid, q_member;
  logic [7:0] vector;

  bloom_filter #(.N(8), .M(4), .KEY_W(8)) dut (.*);

  always #5 clk = ~clk;

  localparam logic [7:0] C [4] = '{8'hB1, 8'h77, 8'h3D, 8'h2F};

  function automatic logic [7:0] mask_of(logic [7:0] k);
    logic [7:0] m;
    m = 0;
    for (int i = 0; i < 4; i++) begin
      logic [15:0] p;
      p = 16'(k) * 16'(C[i]);
      m[p[7:5]] = 1'b1;
    end
    return m;
  endfunction

  logic [7:0] model;
  logic       members [256];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; insert = 0; query = 0; ins_key = 0; q_key = 0;
    #12 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // Clear, then insert a few keys.
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      model = 0;
      foreach (members[k]) members[k] = 0;
      checks++;
      if (vector !== 0) begin failures++; $display("FAIL clear"); end
      for (int i = 0; i < 1 + round % 3; i++) begin
        ins_key = 8'($urandom); insert = 1;
        @(negedge clk); insert = 0;
        model |= mask_of(ins_key);
        members[ins_key] = 1;
        checks++;
        if (vector !== model) begin
          failures++; $display("FAIL vector %b exp %b", vector, model);
        end
      end
      // Query every key.
      for (int k = 0; k < 256; k++) begin
        logic exp_m;
        q_key = 8'(k); query = 1;
        @(posedge clk); #1;
        query = 0;
        exp_m = (model & mask_of(8'(k))) == mask_of(8'(k));
        checks++;
        if (!q_valid || q_member !== exp_m || (members[k] && !q_member)) begin
          failures++;
          if (failures < 20) $display("FAIL query %h: %b exp %b", k, q_member, exp_m);
        end
        if (members[k]) n_true++;
        else if (q_member) n_fp++;
        else n_neg++;
        @(negedge clk);
      end
    end
    if (n_fp == 0 || n_true == 0 || n_neg == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("members %0d, false positives %0d, true negatives %0d", n_true, n_fp, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
