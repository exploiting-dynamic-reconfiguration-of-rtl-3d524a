// Self-checking test of the key hash. A behavioural model of the same published function,
// written byte by byte as in its reference C code, checks keys of every length from 0 to 40
// bytes and of 36, 360 and 3600 bytes, with random initial values. Four fixed results of the
// reference C code pin the model itself: the empty key and "abc" with initial value 0, and
// the keys k[i] = (37 i + 11) mod 256 of 36 bytes (initial value 0x12345678) and of 23
// bytes (initial value 7). Key words are sent both with gaps and on consecutive cycles, and
// dout_valid must be high for exactly the one cycle after the edge that takes the last key
// word, with the hash already on dout.
module tb_key_hash;
  logic clk = 0, rst = 1;
  logic [31:0] din = '0, dout;
  logic wr = 0, dout_valid;
  int checks = 0, failures = 0;

  key_hash dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [95:0] ref_mix(input logic [31:0] a, input logic [31:0] b,
                                          input logic [31:0] c);
    int sh [9] = '{13, 8, 13, 12, 16, 5, 3, 10, 15};
    for (int r = 0; r < 9; r++) begin
      unique case (r % 3)
        0: begin a = a - b; a = a - c; a = a ^ (c >> sh[r]); end
        1: begin b = b - c; b = b - a; b = b ^ (a << sh[r]); end
        default: begin c = c - a; c = c - b; c = c ^ (b >> sh[r]); end
      endcase
    end
    return {a, b, c};
  endfunction

  function automatic logic [31:0] ref_hash(input byte unsigned k [], input logic [31:0] init);
    logic [31:0] a, b, c;
    int len, p;
    a = 32'h9E3779B9; b = a; c = init;
    len = k.size(); p = 0;
    while (len >= 12) begin
      for (int i = 0; i < 4; i++) begin
        a += 32'(k[p + i]) << (8 * i);
        b += 32'(k[p + 4 + i]) << (8 * i);
        c += 32'(k[p + 8 + i]) << (8 * i);
      end
      {a, b, c} = ref_mix(a, b, c);
      p += 12; len -= 12;
    end
    c += 32'(k.size());
    for (int i = 0; i < len; i++) begin
      if (i < 4)      a += 32'(k[p + i]) << (8 * i);
      else if (i < 8) b += 32'(k[p + i]) << (8 * (i - 4));
      else            c += 32'(k[p + i]) << (8 * (i - 7));
    end
    {a, b, c} = ref_mix(a, b, c);
    return c;
  endfunction

  // send a key; gap = idle cycles between words; returns the hash and checks the latency
  task automatic send(input byte unsigned k [], input logic [31:0] init, input int gap,
                      output logic [31:0] h);
    logic [31:0] w;
    int nw;
    nw = (k.size() + 3) / 4;
    din = 32'(k.size()); wr = 1; @(posedge clk); #1 wr = 0;
    repeat (gap) @(posedge clk); #1;
    din = init; wr = 1; @(posedge clk); #1 wr = 0;
    for (int i = 0; i < nw; i++) begin
      repeat (gap) @(posedge clk); #1;
      w = $urandom;                      // bytes past the key end are random on purpose
      for (int j = 0; j < 4; j++) if (4 * i + j < k.size()) w[8*j +: 8] = k[4 * i + j];
      din = w; wr = 1; @(posedge clk); #1 wr = 0;
    end
    check(dout_valid, $sformatf("result right after the last word (%0d bytes)", k.size()));
    h = dout;
    @(posedge clk); #1;
    check(!dout_valid, "dout_valid is one cycle");
    check(dout == h, "hash held");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned k [];
    logic [31:0] h, init;
    int lens [3] = '{36, 360, 3600};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // fixed results of the reference C code
    k = new[0];
    check(ref_hash(k, 0) == 32'hBD49D10D, "model: empty key");
    send(k, 0, 1, h);
    check(h == 32'hBD49D10D, "empty key");
    k = new[3]; k[0] = 8'h61; k[1] = 8'h62; k[2] = 8'h63;
    check(ref_hash(k, 0) == 32'h251E4793, "model: abc");
    send(k, 0, 0, h);
    check(h == 32'h251E4793, "abc");
    k = new[36];
    foreach (k[i]) k[i] = 8'((37 * i + 11) & 255);
    check(ref_hash(k, 32'h12345678) == 32'hC64E6D90, "model: 36-byte key");
    send(k, 32'h12345678, 2, h);
    check(h == 32'hC64E6D90, "36-byte key");
    k = new[23];
    foreach (k[i]) k[i] = 8'((37 * i + 11) & 255);
    check(ref_hash(k, 7) == 32'h9EA5563A, "model: 23-byte key");
    send(k, 7, 0, h);
    check(h == 32'h9EA5563A, "23-byte key");
    // every length from 0 to 40 bytes, random contents and initial values
    for (int n = 0; n <= 40; n++) begin
      k = new[n];
      foreach (k[i]) k[i] = 8'($urandom);
      init = $urandom;
      send(k, init, n % 3, h);
      check(h == ref_hash(k, init), $sformatf("%0d-byte key", n));
    end
    // the key sizes of the published measurements (up to 3600 bytes here)
    foreach (lens[j]) begin
      k = new[lens[j]];
      foreach (k[i]) k[i] = 8'($urandom);
      init = $urandom;
      send(k, init, 0, h);
      check(h == ref_hash(k, init), $sformatf("%0d-byte key", lens[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
