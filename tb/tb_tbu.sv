// tb_tbu: a behavioural 32 x 4 memory with one clock of read latency
// answers the trace back unit. Random decision words and start states; the
// emitted bits are compared with a trace back done in the testbench. Starts
// come back to back (every 16 clocks) and also with gaps, on both halves.
// The first bit must appear 3 clocks after start.
module tb_tbu;
  import viterbi_pkg::*;

  logic       clk = 0, rst_n = 1;
  logic       start = 0, bank = 0;
  state_t     start_state = '0;
  logic       re, busy, bit_valid, bit_out;
  logic [4:0] raddr;
  dec_t       rdata;
  dec_t       mem [32];
  int checks = 0, failures = 0, back_to_back = 0;
  int cyc = 0;
  bit exp_q[$];
  int start_cyc[$];

  tbu dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (re) rdata <= mem[raddr];
  always @(posedge clk) if (start) start_cyc.push_back(cyc);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit first_of_group = 1;
  int nbits = 0;
  always @(posedge clk) if (rst_n && bit_valid) begin
    checks++;
    if (exp_q.size() == 0 || bit_out != exp_q[0]) begin
      failures++;
      $display("bit %0d wrong", nbits);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    if (nbits % 16 == 0) begin
      int sc;
      sc = start_cyc.pop_front();
      checks++;
      if (cyc - sc != 3) begin
        failures++;
        $display("first bit %0d clocks after start, expected 3", cyc - sc);
      end
    end
    nbits++;
  end

  task automatic run_trace(bit b, int gap);
    state_t s;
    for (int i = 0; i < 16; i++) mem[{b, 4'(i)}] = dec_t'($urandom_range(0, 15));
    s = state_t'($urandom_range(0, 3));
    // reference walk
    begin
      state_t c;
      c = s;
      for (int col = 15; col >= 0; col--) begin
        dec_t d;
        d = mem[{b, 4'(col)}];
        exp_q.push_back(c[0]);
        c = {d[c], c[1]};
      end
    end
    start <= 1; start_state <= s; bank <= b;
    @(posedge clk);
    start <= 0;
    repeat (15 + gap) @(posedge clk);
    if (gap == 0) back_to_back++;
  endtask

  initial begin
    for (int i = 0; i < 32; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      // the half being traced must stay unchanged while it is read,
      // so only the other half is refreshed with new random words
      run_trace(k[0], (k % 3 == 0) ? 5 : 0);
    end
    repeat (25) @(posedge clk);
    checks++;
    if (nbits != 40 * 16) begin failures++; $display("got %0d bits", nbits); end
    checks++;
    if (back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
