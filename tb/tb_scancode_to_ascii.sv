// tb_scancode_to_ascii: feeds make / break sequences of scan code set 2 and compares the
// characters with a key table written out here. Covers shift on and off (both shift
// keys), releases producing nothing, E0-prefixed keys, unknown codes, and the one-clock
// delay from code to character.
module tb_scancode_to_ascii;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, code_valid, ascii_valid;
  logic [7:0] code, ascii;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  scancode_to_ascii dut (.*);

  always @(posedge clk) if (ascii_valid) got.push_back(ascii);

  typedef struct { logic [7:0] sc; byte lo; byte hi; } key_t;
  key_t keys [] = '{
    '{8'h1C, "a", "A"}, '{8'h32, "b", "B"}, '{8'h2D, "r", "R"}, '{8'h1A, "z", "Z"},
    '{8'h45, "0", ")"}, '{8'h16, "1", "!"}, '{8'h46, "9", "("}, '{8'h49, ".", ">"},
    '{8'h4A, "/", "?"}, '{8'h4C, ";", ":"}, '{8'h4E, "-", "_"}, '{8'h29, " ", " "},
    '{8'h5A, 8'h0D, 8'h0D}, '{8'h66, 8'h08, 8'h08}, '{8'h71, ".", "."}, '{8'h69, "1", "1"}
  };

  task automatic put(input logic [7:0] c);
    @(negedge clk) begin code = c; code_valid = 1; end
    @(negedge clk) code_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_chars(input string s);
    checks++;
    if (got.size() != s.len()) begin
      failures++; $display("FAIL got %0d chars want %0d (%s)", got.size(), s.len(), s);
      foreach (got[i]) $write("%h ", got[i]); $display("");
    end else begin
      for (int i = 0; i < s.len(); i++)
        if (got[i] != s[i]) begin failures++; $display("FAIL char %0d %h want %h", i, got[i], s[i]); end
    end
    got.delete();
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string lo_s, hi_s;
    rst_n = 0; code = 0; code_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    got.delete();
    // each key pressed and released
    lo_s = "";
    foreach (keys[i]) begin put(keys[i].sc); put(8'hF0); put(keys[i].sc); lo_s = {lo_s, string'(keys[i].lo)}; end
    expect_chars(lo_s);
    // left shift held
    hi_s = "";
    put(8'h12);
    foreach (keys[i]) begin put(keys[i].sc); put(8'hF0); put(keys[i].sc); hi_s = {hi_s, string'(keys[i].hi)}; end
    put(8'hF0); put(8'h12);
    expect_chars(hi_s);
    // right shift, then released
    put(8'h59); put(8'h1C); put(8'hF0); put(8'h59); put(8'h1C);
    expect_chars("Aa");
    // extended keys: keypad enter and slash, right ctrl (E0 14) gives nothing,
    // and E0 12 (a fake shift) must not latch shift
    put(8'hE0); put(8'h5A); put(8'hE0); put(8'hF0); put(8'h5A);
    put(8'hE0); put(8'h4A);
    put(8'hE0); put(8'h14); put(8'hE0); put(8'hF0); put(8'h14);
    put(8'hE0); put(8'h12); put(8'h32);
    expect_chars({8'h0D, "/b"});
    // unknown codes and lone break codes give nothing
    put(8'h05); put(8'h76); put(8'hAA); put(8'hFA); put(8'hF0); put(8'h1C);
    expect_chars("");
    // latency: character valid exactly one clock after the code
    @(negedge clk) begin code = 8'h24; code_valid = 1; end
    @(negedge clk) begin
      code_valid = 0;
      checks++;
      if (!(ascii_valid && ascii == "e")) begin failures++; $display("FAIL latency"); end
    end
    got.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
