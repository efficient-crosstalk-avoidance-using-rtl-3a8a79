// tb_mrfc_codec: end-to-end test of the MRFC crosstalk-avoidance CODEC.
//
// A reference model kept in the testbench encodes each data word with the
// 3-bit MRFC table, cancels every run of two or more neighbouring wires that
// would switch against the last driven word, and predicts the bus two clocks
// after the data word. The test runs
//   1. the ordered sweep 000..111, where 100 -> 101 (0111 -> 1100) must be
//      sent as 1111, and the wrap 111 -> 000 must leave the bus still,
//   2. random words with idle cycles, and a reset in the middle,
// and checks bus, bus_valid, flip_mask, xtalk_seen, bus_clean, the decoded
// rx_data and, on every edge, that no two neighbouring bus wires switch.
// It counts how often each mechanism happened (words passed unchanged,
// words flipped, flips covering more than one pair, idle hold, reset) and
// fails if one never did. The CODEC has no parameters, so this is also the
// full-size test.
module tb_mrfc_codec;
  import mrfc_pkg::*;
  logic  clk = 0, rst = 1, in_valid = 0;
  data_t in_data = '0;
  code_t bus, flip_mask;
  logic  bus_valid, xtalk_seen, bus_clean;
  data_t rx_data;
  int checks = 0, failures = 0;
  int n_pass = 0, n_flip = 0, n_multi = 0, n_idle = 0, n_reset = 0, n_example = 0;

  localparam code_t TABLE [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                                  4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for one bus transfer: neighbouring switching wires keep their value.
  function automatic code_t ref_fix(code_t p, code_t n);
    code_t sw, res;
    sw  = p ^ n;
    res = n;
    for (int i = 0; i < CODE_W; i++) begin
      bit left, right;
      left  = (i + 1 < CODE_W) && sw[(i + 1) % CODE_W];
      right = (i > 0) && sw[(i + CODE_W - 1) % CODE_W];
      if (sw[i] && (left || right)) res[i] = p[i];
    end
    return res;
  endfunction

  function automatic int weight_sum(code_t c);
    return 3 * c[3] + 2 * c[2] + c[1] + c[0];
  endfunction

  // Reference pipeline: stage 1 = encoder register, stage 2 = bus.
  bit    s1_valid;
  data_t s1_data;
  code_t m_bus, m_mask;
  bit    m_valid;
  data_t m_sent;
  code_t bus_before;

  task automatic ref_step(input bit rst_now, input bit v, input data_t d);
    if (rst_now) begin
      s1_valid = 0; s1_data = '0; m_bus = '0; m_mask = '0; m_valid = 0;
    end else begin
      m_valid = s1_valid;
      if (s1_valid) begin
        code_t nb;
        nb     = ref_fix(m_bus, TABLE[s1_data]);
        m_mask = nb ^ TABLE[s1_data];
        m_bus  = nb;
        m_sent = s1_data;
      end
      s1_valid = v;
      if (v) s1_data = d;
    end
  endtask

  task automatic check_outputs();
    checks++;
    if (bus !== m_bus || bus_valid !== m_valid || flip_mask !== m_mask ||
        xtalk_seen !== (m_mask != 0) || bus_clean !== 1'b1) begin
      failures++;
      $display("FAIL t=%0t bus=%b/%b valid=%b/%b mask=%b/%b xt=%b clean=%b",
               $time, bus, m_bus, bus_valid, m_valid, flip_mask, m_mask, xtalk_seen, bus_clean);
    end
    checks++;
    if (int'(rx_data) != weight_sum(bus)) begin
      failures++;
      $display("FAIL t=%0t rx_data=%0d for bus %b", $time, rx_data, bus);
    end
    if (m_valid && m_mask == 0) begin
      checks++;
      if (rx_data !== m_sent) begin
        failures++;
        $display("FAIL t=%0t unflipped word decoded to %0d, sent %0d", $time, rx_data, m_sent);
      end
    end
  endtask

  // Drive one cycle, clock it, update the model, check, and count mechanisms.
  task automatic cycle(input bit r, input bit v, input data_t d);
    rst = r; in_valid = v; in_data = d;
    bus_before = bus;
    @(posedge clk);
    ref_step(r, v, d);
    #1;
    check_outputs();
    if (!r) begin
      code_t sw;
      sw = bus ^ bus_before;
      checks++;
      if ((sw & (sw >> 1)) != 0) begin
        failures++;
        $display("FAIL t=%0t neighbouring wires switched: %b -> %b", $time, bus_before, bus);
      end
      if (m_valid && m_mask == 0) n_pass++;
      if (m_valid && m_mask != 0) n_flip++;
      if (m_valid && $countones(m_mask) > 2) n_multi++;
      if (!m_valid && sw == 0) n_idle++;
    end else begin
      n_reset++;
    end
  endtask

  initial begin
    cycle(1, 0, '0);
    cycle(1, 0, '0);
    // 1. Ordered sweep, two rounds, one word per clock.
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 8; d++) begin
        cycle(0, 1, data_t'(d));
        // After the edge that takes 110, the bus holds 101 (sent after 100).
        if (r == 0 && d == 6) begin
          checks++;
          if (bus !== 4'b1111 || flip_mask !== 4'b0011) begin
            failures++;
            $display("FAIL sweep: 101 after 100 sent as %b mask %b, expected 1111 mask 0011", bus, flip_mask);
          end else n_example++;
        end
      end
    end
    cycle(0, 0, '0);
    cycle(0, 0, '0);
    // 2. Random traffic with gaps.
    for (int n = 0; n < 2000; n++) begin
      cycle(0, $urandom_range(0, 4) != 0, data_t'($urandom_range(0, 7)));
    end
    // 3. Reset in the middle, then more traffic.
    cycle(1, 1, 3'd5);
    cycle(0, 1, 3'd7);
    cycle(0, 1, 3'd0);
    cycle(0, 0, '0);
    for (int n = 0; n < 500; n++) begin
      cycle(0, $urandom_range(0, 4) != 0, data_t'($urandom_range(0, 7)));
    end
    cycle(0, 0, '0);
    cycle(0, 0, '0);

    $display("words passed unchanged=%0d flipped=%0d multi-pair flips=%0d idle holds=%0d resets=%0d sweep example=%0d",
             n_pass, n_flip, n_multi, n_idle, n_reset, n_example);
    checks++; if (n_pass == 0)    begin failures++; $display("FAIL no unchanged word"); end
    checks++; if (n_flip == 0)    begin failures++; $display("FAIL no flipped word"); end
    checks++; if (n_multi == 0)   begin failures++; $display("FAIL no multi-pair flip"); end
    checks++; if (n_idle == 0)    begin failures++; $display("FAIL no idle hold"); end
    checks++; if (n_reset == 0)   begin failures++; $display("FAIL no reset"); end
    checks++; if (n_example == 0) begin failures++; $display("FAIL sweep example not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
