// tb_rlc_secure_link: end-to-end test of the secure text link at its
// default (and only) configuration.
//
// A text message is generated in the testbench (sentences cycled from a
// small phrase list, over 600 characters so the 255-step key stream wraps
// around) and pushed through sender, channel and receiver. Checked:
//   - every character that crosses the channel equals the reference
//     cipher applied with the reference key stream;
//   - the receiver returns the message unchanged, in order;
//   - two-cycle latency from sender input to receiver output at full rate;
//   - with a different key at the receiver the message does not come back.
// Each mechanism of the design is counted and must happen at least once:
// key load at each end, zero-seed substitution, full-rate back-to-back
// transfer, back-pressure stall reaching the sender, key-stream wrap-around
// and wrong-key rejection.
module tb_rlc_secure_link;
  import tb_rlc_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_key_load = 1'b0, rx_key_load = 1'b0;
  logic [7:0] tx_key = 8'h00, rx_key = 8'h00;
  logic pt_valid = 1'b0, pt_ready;
  logic [7:0] pt_data = 8'h00;
  logic out_valid, out_ready = 1'b0;
  logic [7:0] out_data;
  logic chan_valid, chan_ready;
  logic [7:0] chan_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rlc_secure_link dut (
    .clk(clk), .rst_n(rst_n),
    .tx_key_load_i(tx_key_load), .tx_key_i(tx_key),
    .rx_key_load_i(rx_key_load), .rx_key_i(rx_key),
    .pt_valid_i(pt_valid), .pt_ready_o(pt_ready), .pt_data_i(pt_data),
    .pt_valid_o(out_valid), .pt_ready_i(out_ready), .pt_data_o(out_data),
    .chan_valid_o(chan_valid), .chan_ready_o(chan_ready), .chan_data_o(chan_data)
  );

  // ---- mechanism counters
  int n_tx_load = 0, n_rx_load = 0, n_zero_seed = 0, n_back_to_back = 0;
  int n_sender_stall = 0, n_wrap = 0, n_wrong_key = 0;

  // ---- message generation
  string phrases [4] = '{"Meet at the north gate at 0600. ",
                         "Reversible gates lose no information. ",
                         "Key stream is 255 characters long; ",
                         "THE QUICK BROWN FOX JUMPS OVER THE LAZY DOG! "};
  logic [7:0] msg [$];

  function automatic void build_message(int min_len);
    int i = 0;
    msg.delete();
    while (msg.size() < min_len) begin
      string s = phrases[i % 4];
      for (int c = 0; c < s.len(); c++) msg.push_back(s[c]);
      i++;
    end
  endfunction

  // ---- scoreboard
  logic [7:0] tx_model, sent_q [$];
  int unsigned sent_cycle [$];
  int unsigned cyc = 0;
  int tx_count = 0;
  int rx_count = 0, rx_mismatch = 0;
  bit in_fired = 1'b0;
  bit expect_match = 1'b1;
  bit check_latency = 1'b0;
  logic [7:0] first_seed;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    in_fired = pt_valid && pt_ready;
    if (rst_n) begin
      if (tx_key_load) begin
        tx_model = ref_seed(tx_key);
        first_seed = tx_model;
        tx_count = 0;
        n_tx_load++;
        if (tx_key == 8'h00) n_zero_seed++;
      end
      if (rx_key_load) n_rx_load++;
      if (pt_valid && pt_ready) begin
        sent_q.push_back(pt_data);
        sent_cycle.push_back(cyc);
      end
      if (pt_valid && !pt_ready && chan_valid && !chan_ready) n_sender_stall++;
      if (chan_valid && chan_ready) begin
        logic [7:0] p;
        p = sent_q[tx_count - rx_count];  // oldest not yet on the channel
        checks++;
        if (chan_data !== ref_encrypt(p, tx_model)) begin
          failures++;
          $display("FAIL channel ct=%h exp=%h", chan_data, ref_encrypt(p, tx_model));
        end
        tx_model = ref_lfsr_next(tx_model);
        tx_count++;
        if (tx_model == first_seed) n_wrap++;
      end
      if (out_valid && out_ready) begin
        logic [7:0] e;
        int unsigned c;
        e = sent_q.pop_front();
        c = sent_cycle.pop_front();
        rx_count++;
        if (expect_match) begin
          checks++;
          if (out_data !== e) begin
            failures++;
            $display("FAIL recovered %h exp %h", out_data, e);
          end
          if (check_latency) begin
            checks++;
            if (cyc - c != 2) begin
              failures++;
              $display("FAIL latency %0d", cyc - c);
            end else n_back_to_back++;
          end
        end else if (out_data !== e) rx_mismatch++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_keys(logic [7:0] kt, logic [7:0] kr);
    @(negedge clk);
    tx_key_load = 1'b1; tx_key = kt;
    rx_key_load = 1'b1; rx_key = kr;
    @(negedge clk);
    tx_key_load = 1'b0; rx_key_load = 1'b0;
  endtask

  task automatic drain();
    pt_valid = 1'b0; out_ready = 1'b1;
    repeat (6) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin
      failures++;
      $display("FAIL %0d characters lost", sent_q.size());
    end
    sent_q.delete(); sent_cycle.delete();
    tx_count = 0; rx_count = 0;
  endtask

  // send the message; ready_pct is the chance in percent that the
  // receiving end takes a character in a cycle
  task automatic send_message(int ready_pct);
    int idx = 0;
    while (idx < msg.size()) begin
      pt_valid = 1'b1;
      pt_data  = msg[idx];
      out_ready = ($urandom_range(1, 100) <= ready_pct);
      @(negedge clk);
      if (in_fired) idx++;
    end
    pt_valid = 1'b0;
  endtask

  initial begin
    string shown;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    // 1. full rate, matching keys, long message (key stream wraps)
    build_message(600);
    load_keys("K", "K");
    check_latency = 1'b1;
    send_message(100);
    drain();
    check_latency = 1'b0;

    // 2. random back-pressure at the receiving end, new shared key
    build_message(300);
    load_keys(8'hA7, 8'hA7);
    send_message(40);
    drain();

    // 3. zero private key (replaced by the non-zero substitute at both ends)
    build_message(100);
    load_keys(8'h00, 8'h00);
    send_message(70);
    drain();

    // 4. wrong key at the receiver: the message must not come back
    build_message(100);
    expect_match = 1'b0;
    rx_mismatch = 0;
    load_keys("K", "L");
    send_message(100);
    drain();
    expect_match = 1'b1;
    checks++;
    if (rx_mismatch < 50) begin
      failures++;
      $display("FAIL wrong key recovered too much (%0d of 100 differ)", rx_mismatch);
    end else n_wrong_key++;
    $display("wrong key: %0d of %0d characters differ", rx_mismatch, msg.size());

    // mechanisms
    $display("mechanisms: tx_key_load=%0d rx_key_load=%0d zero_seed=%0d back_to_back=%0d sender_stall=%0d key_wrap=%0d wrong_key=%0d",
             n_tx_load, n_rx_load, n_zero_seed, n_back_to_back, n_sender_stall, n_wrap, n_wrong_key);
    checks++; if (n_tx_load == 0)      begin failures++; $display("FAIL no tx key load"); end
    checks++; if (n_rx_load == 0)      begin failures++; $display("FAIL no rx key load"); end
    checks++; if (n_zero_seed == 0)    begin failures++; $display("FAIL no zero seed"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no full-rate transfer"); end
    checks++; if (n_sender_stall == 0) begin failures++; $display("FAIL no stall at sender"); end
    checks++; if (n_wrap == 0)         begin failures++; $display("FAIL key stream never wrapped"); end
    checks++; if (n_wrong_key == 0)    begin failures++; $display("FAIL wrong key not shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
