// tb_rsa_qca_top: end-to-end test of the transmitter/receiver chain at its
// default (and only) size.
//
// A stream of messages, with random gaps, enters one per cycle. The checks
// follow a three-deep reference pipeline with integer arithmetic:
//   two edges after M is sampled: cipher_valid, cipher_out = M^3 mod 10,
//                                  range_err = (M >= 10)
//   three edges after:            plain_valid, plain_out = (M^3 mod 10)^7 mod 10
// and idle outputs in the cycles between. It first sends every message 0..15
// in order back to back, then random traffic, then asserts reset in the middle
// of traffic. Events counted, each of which must happen at least once:
// back-to-back messages, gaps, out-of-range messages, round trips that return
// the message, and a reset that flushes messages in flight.
module tb_rsa_qca_top;
  localparam int NCYC = 400;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic [3:0] msg_in;
  logic       cipher_valid, range_err, plain_valid;
  logic [3:0] cipher_out, plain_out;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gap = 0, n_range = 0, n_round_trip = 0, n_flush = 0;

  rsa_qca_top dut (
    .clk, .rst_n, .in_valid, .msg_in,
    .cipher_valid, .cipher_out, .range_err,
    .plain_valid, .plain_out
  );

  always #5 clk = ~clk;

  function automatic int pow_mod(int base, int e, int n);
    int r = 1;
    for (int k = 0; k < e; k++) r = (r * base) % n;
    return r;
  endfunction

  task automatic check(input bit cond, input string what, input int cyc);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference pipeline: what entered at each sampling edge, three deep.
  bit       s1v, s2v, s3v;
  bit [3:0] s1m, s2m, s3m;
  int       n_in = 0, n_out = 0, n_lost = 0;

  initial begin
    int cyc;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    msg_in   = '0;
    {s1v, s2v, s3v} = '0;
    {s1m, s2m, s3m} = '0;
    repeat (3) @(posedge clk);

    for (cyc = 0; cyc < NCYC; cyc++) begin
      // Drive the inputs for the next sampling edge.
      @(negedge clk);
      rst_n = !(cyc >= 300 && cyc < 302);      // reset pulse mid-traffic
      if (cyc < 16) begin
        in_valid = 1'b1;
        msg_in   = 4'(cyc);
      end else if (cyc >= 390) begin
        in_valid = 1'b0;                        // drain
        msg_in   = 4'($urandom_range(0, 15));
      end else begin
        in_valid = ($urandom_range(0, 3) != 0);
        msg_in   = ($urandom_range(0, 7) == 0) ? 4'($urandom_range(10, 15))
                                               : 4'($urandom_range(0, 9));
      end
      if (rst_n && in_valid && s1v) n_back_to_back++;
      if (rst_n && !in_valid && s1v) n_gap++;

      // Sampling edge: advance the reference.
      @(posedge clk);
      if (!rst_n) begin
        if (s1v || s2v) n_flush++;
        n_lost += int'(s1v) + int'(s2v);
        {s1v, s2v, s3v} = '0;
      end else begin
        {s3v, s3m} = {s2v, s2m};
        {s2v, s2m} = {s1v, s1m};
        {s1v, s1m} = {in_valid, msg_in};
        if (in_valid) n_in++;
      end

      #1;
      check(cipher_valid == s2v, "cipher_valid", cyc);
      check(plain_valid == s3v, "plain_valid", cyc);
      check(range_err == (s2v && s2m >= 4'd10), "range_err", cyc);
      if (s2v) begin
        check(int'(cipher_out) == pow_mod(int'(s2m), 3, 10),
              $sformatf("cipher_out M=%0d got %0d", s2m, cipher_out), cyc);
        if (s2m >= 4'd10) n_range++;
      end
      if (s3v) begin
        n_out++;
        check(int'(plain_out) == pow_mod(pow_mod(int'(s3m), 3, 10), 7, 10),
              $sformatf("plain_out M=%0d got %0d", s3m, plain_out), cyc);
        if (s3m < 4'd10) begin
          check(plain_out == s3m, "round trip", cyc);
          n_round_trip++;
        end
      end
    end

    // Every accepted message came out once, unless a reset discarded it.
    check(n_out == n_in - n_lost, $sformatf("in %0d out %0d lost %0d", n_in, n_out, n_lost), cyc);
    $display("events: back_to_back=%0d gaps=%0d out_of_range=%0d round_trips=%0d flushes=%0d",
             n_back_to_back, n_gap, n_range, n_round_trip, n_flush);
    check(n_back_to_back > 0, "no back-to-back messages", cyc);
    check(n_gap > 0, "no gaps", cyc);
    check(n_range > 0, "no out-of-range message", cyc);
    check(n_round_trip > 0, "no round trip", cyc);
    check(n_flush > 0, "no reset flush", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
