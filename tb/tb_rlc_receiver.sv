// tb_rlc_receiver: feeds the receiver ciphertext made by the reference
// cipher and key stream from random characters, under random valid and
// random back-pressure, and checks that every recovered character equals
// the original. Also checks the one-cycle latency at full rate (the same as
// the sender's), that a stall holds the output, and a key reload.
module tb_rlc_receiver;
  import tb_rlc_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic key_load = 1'b0;
  logic [7:0] key = 8'h00;
  logic ct_valid = 1'b0, ct_ready;
  logic [7:0] ct_data = 8'h00;
  logic pt_valid, pt_ready = 1'b0;
  logic [7:0] pt_data;
  int checks = 0, failures = 0;
  int stalls = 0;

  always #5 clk = ~clk;

  rlc_receiver dut (.clk(clk), .rst_n(rst_n), .key_load_i(key_load), .key_i(key),
                    .ct_valid_i(ct_valid), .ct_ready_o(ct_ready), .ct_data_i(ct_data),
                    .pt_valid_o(pt_valid), .pt_ready_i(pt_ready), .pt_data_o(pt_data));

  // the testbench's own sender model
  logic [7:0] tx_key;
  logic [7:0] cur_plain;
  // expected plaintext, filled when a ciphertext character is accepted
  logic [7:0] exp_q [$];
  int unsigned acc_cycle [$];
  int unsigned cyc = 0;
  bit fired = 1'b0;   // a transfer happened at the last rising edge
  bit check_latency = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    fired = ct_valid && ct_ready;
    if (rst_n) begin
      if (pt_valid && pt_ready) begin
        logic [7:0] e;
        int unsigned c;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected plaintext %h", pt_data);
        end else begin
          e = exp_q.pop_front();
          c = acc_cycle.pop_front();
          if (pt_data !== e) begin
            failures++;
            $display("FAIL pt=%h exp=%h", pt_data, e);
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
      if (pt_valid && !pt_ready) stalls++;
      if (ct_valid && ct_ready) begin
        exp_q.push_back(cur_plain);
        acc_cycle.push_back(cyc);
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
    @(negedge clk); key_load = 1'b1; key = kv; ct_valid = 1'b0;
    tx_key = ref_seed(kv);
    @(negedge clk); key_load = 1'b0;
  endtask

  // present the next character: encrypt it with the model key stream
  task automatic present();
    cur_plain = 8'($urandom);
    ct_data   = ref_encrypt(cur_plain, tx_key);
    tx_key    = ref_lfsr_next(tx_key);
    ct_valid  = 1'b1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    load_key("R");
    check_latency = 1'b1;
    pt_ready = 1'b1;
    for (int i = 0; i < 50; i++) begin
      present();
      @(negedge clk);
    end
    ct_valid = 1'b0;
    repeat (3) @(negedge clk);
    check_latency = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      if (!ct_valid || fired) begin
        if ($urandom_range(0, 3) != 0) present();
        else ct_valid = 1'b0;
      end
      pt_ready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (i == 1000) begin
        // drain the pending transfer before reloading the key
        pt_ready = 1'b1;
        while (ct_valid && !fired) @(negedge clk);
        ct_valid = 1'b0;
        @(negedge clk);
        load_key(8'hc3);
      end
    end
    ct_valid = 1'b0; pt_ready = 1'b1;
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
