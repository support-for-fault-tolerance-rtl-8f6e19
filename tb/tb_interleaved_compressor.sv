// tb_interleaved_compressor: checks the interleaved-parity signature of a
// 32-bit word (4 chains of every fourth bit) and of the 100-bit state bus,
// and the detection properties: every single error and every burst of 2..4
// adjacent errors changes the signature, and close to 15/16 of random
// multi-bit errors do.
module tb_interleaved_compressor;
  int checks = 0, failures = 0;

  logic [31:0]  d32;
  logic [3:0]   s32;
  logic [99:0]  d100;
  logic [3:0]   s100;

  interleaved_compressor                  dut32  (.data(d32), .sig(s32));
  interleaved_compressor #(.W(100))       dut100 (.data(d100), .sig(s100));

  function automatic logic [3:0] ref32(logic [31:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < 32; i++) r[i % 4] ^= v[i];
    return r;
  endfunction
  function automatic logic [3:0] ref100(logic [99:0] v);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < 100; i++) r[i % 4] ^= v[i];
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int detected, trials;
    for (int n = 0; n < 1000; n++) begin
      d32 = $urandom;
      d100 = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(s32 == ref32(d32), $sformatf("sig32 %h", d32));
      check(s100 == ref100(d100), "sig100");
    end
    // single errors and bursts of up to four adjacent errors
    for (int len = 1; len <= 4; len++)
      for (int pos = 0; pos + len <= 32; pos++) begin
        logic [3:0]  g;
        logic [31:0] e;
        d32 = $urandom;
        #1;
        g = s32;
        e = ((32'h1 << len) - 1) << pos;
        d32 = d32 ^ e;
        #1;
        check(s32 != g, $sformatf("burst of %0d at %0d detected", len, pos));
      end
    // random multi-bit errors: about 93.75 % detected
    detected = 0;
    trials = 4000;
    for (int n = 0; n < trials; n++) begin
      logic [3:0]  g;
      logic [31:0] e;
      d32 = $urandom;
      #1;
      g = s32;
      do e = $urandom; while ($countones(e) < 2);
      d32 = d32 ^ e;
      #1;
      if (s32 != g) detected++;
    end
    $display("random multi-bit errors detected: %0d of %0d", detected, trials);
    check(detected > trials * 91 / 100 && detected < trials * 96 / 100, "coverage near 93.75 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
