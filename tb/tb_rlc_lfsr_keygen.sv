// tb_rlc_lfsr_keygen: checks the key-stream LFSR against a reference
// shift register: seed loading, one step per step_i, holding when idle,
// load taking priority over step, the zero-seed substitute, and that from
// any seed the sequence visits all 255 non-zero states before repeating.
module tb_rlc_lfsr_keygen;
  import tb_rlc_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, step = 1'b0;
  logic [7:0] seed = 8'h00, key;
  logic [7:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rlc_lfsr_keygen dut (.clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed),
                       .step_i(step), .key_o(key));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (key !== model) begin
      failures++;
      $display("FAIL %s: key=%h model=%h", what, key, model);
    end
  endtask

  initial begin
    bit seen [256];
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // load a seed
    @(negedge clk); load = 1'b1; seed = "K";
    @(negedge clk); load = 1'b0; model = "K"; check("load");
    // step 20 times with random idle cycles in between
    for (int i = 0; i < 20; i++) begin
      step = $urandom_range(0, 1);
      @(negedge clk);
      if (step) model = ref_lfsr_next(model);
      check("step/hold");
    end
    // load beats step
    step = 1'b1; load = 1'b1; seed = 8'h5a;
    @(negedge clk); step = 1'b0; load = 1'b0; model = 8'h5a; check("load priority");
    // zero seed
    load = 1'b1; seed = 8'h00;
    @(negedge clk); load = 1'b0; model = 8'h01; check("zero seed");
    // full period from seed 8'h01
    foreach (seen[i]) seen[i] = 1'b0;
    period = 0;
    step = 1'b1;
    do begin
      seen[key] = 1'b1;
      @(negedge clk);
      model = ref_lfsr_next(model);
      period++;
      check("period walk");
    end while (key != 8'h01 && period < 300);
    step = 1'b0;
    checks++;
    if (period != 255) begin
      failures++;
      $display("FAIL period=%0d, expected 255", period);
    end
    checks++;
    if (seen[0]) begin
      failures++;
      $display("FAIL state 0 reached");
    end
    for (int s = 1; s < 256; s++) begin
      checks++;
      if (!seen[s]) begin
        failures++;
        $display("FAIL state %h never reached", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
