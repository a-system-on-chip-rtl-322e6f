// tb_edac_top: end-to-end self-checking test of the EDAC core at its
// default (and only) size: 11-bit words, 16-bit stored codewords.
//
// A stream of random words is written through the core, one per clock.
// For every word the testbench picks how many bits to upset in storage
// (none, one or two, at random positions) and drives seu_mask during the
// cycle in which that word is the stored codeword. Expected outputs, from
// the independent reference model:
//   - data_to_memory equals the reference codeword one edge after datain,
//   - dataout/ne/sec/ded show the word's decode one edge later (two edges
//     after datain): ne with the word for no upset, sec with the word for
//     one upset, ded with zero data for two upsets.
// The asynchronous clear is held from time zero, and asserted twice in mid-stream
// between clock edges; all outputs and the input register must read zero
// at once. Each mechanism (clean read, correction, double detection,
// clear) is counted and must occur.
module tb_edac_top;
  import tb_hamming16_ref_pkg::*;

  localparam int WORDS = 4000;

  logic        clk = 1'b0;
  logic        clr_n;
  logic [10:0] datain;
  logic [15:0] seu_mask;
  logic [15:0] data_to_memory;
  logic [10:0] dataout;
  logic        ne, sec, ded;

  int checks = 0, failures = 0;
  int n_ne = 0, n_sec = 0, n_ded = 0, n_clear = 0;

  edac_top dut (.clk(clk), .clr_n(clr_n), .datain(datain), .seu_mask(seu_mask),
                .data_to_memory(data_to_memory), .dataout(dataout),
                .ne(ne), .sec(sec), .ded(ded));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0t din=%h mem=%h out=%h ne=%b sec=%b ded=%b",
                 what, $time, datain, data_to_memory, dataout, ne, sec, ded);
    end
  endtask

  initial begin
    repeat (WORDS * 2 + 100) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] random_mask(input int upsets);
    logic [15:0] m = '0;
    int a, b;
    a = int'($urandom_range(15));
    if (upsets >= 1) m[a] = 1'b1;
    if (upsets == 2) begin
      b = int'($urandom_range(14));
      if (b >= a) b++;
      m[b] = 1'b1;
    end
    return m;
  endfunction

  task automatic clear_now();
    #2 clr_n = 1'b0;
    #1;
    check(dataout == '0 && !ne && !sec && !ded, "clear outputs");
    check(data_to_memory == '0, "clear input register");
    n_clear++;
    @(negedge clk);
    clr_n = 1'b1;
  endtask

  initial begin
    logic [10:0] word_q [$];
    logic [15:0] mask_q [$];
    int          ups_q  [$];
    logic [10:0] w;
    int          u;

    clr_n    = 1'b0;            // power-up clear
    datain   = '0;
    seu_mask = '0;
    repeat (2) @(negedge clk);
    check(dataout == '0 && !ne && !sec && !ded, "power-up clear outputs");
    check(data_to_memory == '0, "power-up clear input register");
    n_clear++;
    clr_n = 1'b1;
    datain = 11'h7FF;           // first word after clear
    @(posedge clk); #1;
    check(data_to_memory == ref_encode(11'h7FF), "load after clear");

    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      // outputs now show the word loaded two edges ago
      if (word_q.size() == 2) begin
        w = word_q.pop_front();
        u = ups_q.pop_front();
        void'(mask_q.pop_front());
        case (u)
          0: begin check(ne && !sec && !ded && dataout == w, "clean read"); n_ne  += int'(ne);  end
          1: begin check(sec && !ne && !ded && dataout == w, "corrected");  n_sec += int'(sec); end
          default: begin check(ded && !ne && !sec && dataout == '0, "double"); n_ded += int'(ded); end
        endcase
      end
      // the word in the input register, and its upsets in storage
      if (word_q.size() == 1) begin
        check(data_to_memory == ref_encode(word_q[0]), "stored codeword");
        seu_mask = mask_q[0];
      end
      if (i == WORDS / 3 || i == 2 * WORDS / 3) begin
        clear_now();            // returns at a falling edge with clear released
        word_q.delete(); mask_q.delete(); ups_q.delete();
        seu_mask = '0;
      end
      w = 11'($urandom);
      u = int'($urandom_range(2));
      datain = w;
      word_q.push_back(w);
      ups_q.push_back(u);
      mask_q.push_back(random_mask(u));
    end

    check(n_ne > 0,    "no clean read seen");
    check(n_sec > 0,   "no correction seen");
    check(n_ded > 0,   "no double error seen");
    check(n_clear == 3, "clear count");
    $display("clean=%0d corrected=%0d double=%0d clears=%0d", n_ne, n_sec, n_ded, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
