// tb_rlc_sender: drives random characters into the sender under random
// valid and random back-pressure and compares every ciphertext character
// with the reference cipher and key stream. Also checks the one-cycle
// latency at full rate, that a stall holds the output, and that reloading
// the key restarts the key stream.
module tb_rlc_sender;
  import tb_rlc_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic key_load = 1'b0;
  logic [7:0] key = 8'h00;
  logic pt_valid = 1'b0, pt_ready;
  logic [7:0] pt_data = 8'h00;
  logic ct_valid, ct_ready = 1'b0;
  logic [7:0] ct_data;
  int checks = 0, failures = 0;
  int stalls = 0;

  always #5 clk = ~clk;

  rlc_sender dut (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key),
                  .pt_valid_i(pt_valid), .pt_ready_o(pt_ready), .pt_data_i(pt_data),
                  .ct_valid_o(ct_valid), .ct_ready_i(ct_ready), .ct_data_o(ct_data));

  // expected ciphertext queue, filled when a character is accepted
  logic [7:0] exp_q [$];
  int unsigned acc_cycle [$];
  logic [7:0] key_model;
  int unsigned cyc = 0;
  bit fired = 1'b0;   // a transfer happened at the last rising edge
  bit check_latency = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    fired = pt_valid && pt_ready;
    if (rst_n) begin
      if (ct_valid && ct_ready) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected ciphertext %h", ct_data);
        end else begin
          logic [7:0] e;
          int unsigned c;
          e = exp_q.pop_front();
          c = acc_cycle.pop_front();
          if (ct_data !== e) begin
            failures++;
            $display("FAIL ct=%h exp=%h", ct_data, e);
          end
          if (check_latency) begin
            checks++;
            if (cyc - c != 1) begin
              failures++;
              $display("FAIL latency %0d cycles", cyc - c);
            end
          end
        end
      end
      if (ct_valid && !ct_ready) stalls++;
      if (key_load) key_model = ref_seed(key);
      else if (pt_valid && pt_ready) begin
        exp_q.push_back(ref_encrypt(pt_data, key_model));
        acc_cycle.push_back(cyc);
        key_model = ref_lfsr_next(key_model);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(logic [7:0] kv);
    @(negedge clk); key_load = 1'b1; key = kv; pt_valid = 1'b0;
    @(negedge clk); key_load = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    load_key("S");
    // full rate: valid always, ready always
    check_latency = 1'b1;
    ct_ready = 1'b1;
    for (int i = 0; i < 50; i++) begin
      pt_valid = 1'b1; pt_data = 8'($urandom_range(32, 126));
      @(negedge clk);
    end
    pt_valid = 1'b0;
    repeat (3) @(negedge clk);
    check_latency = 1'b0;
    // random valid and back-pressure
    for (int i = 0; i < 2000; i++) begin
      if (!pt_valid || fired) begin
        pt_valid = ($urandom_range(0, 3) != 0);
        pt_data  = 8'($urandom);
      end
      ct_ready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (i == 1000) begin
        // let the pending transfer finish, then reload the key
        ct_ready = 1'b1; pt_valid = 1'b0;
        @(negedge clk);
        load_key(8'h00);
      end
    end
    pt_valid = 1'b0; ct_ready = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d characters never came out", exp_q.size());
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no stall happened");
    end
    $display("stalled cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
