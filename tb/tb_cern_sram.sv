// tb_cern_sram: end-to-end test of the macro, 1024 words x 18 bits.
//
// The memory is first filled by write-only cycles, then driven with random
// read and write requests against a reference model. Each read is checked
// during the high phase of the cycle whose rising edge sampled it (same-
// cycle read data), and again in the low phase, while the write of that
// cycle takes place, to show that the output latch holds. A read and a write
// to the same address in one cycle must return the old word. Cycles with no
// request must keep the output unchanged and must not raise any wordline or
// block select (standby, and idle with changing addresses and data). During
// accesses, the row, column and block selects must be one-hot (divided
// wordline). Each of these situations is counted, and one that never
// occurred counts as a failure.
module tb_cern_sram;
  localparam int unsigned WORDS = 1024, NBYTE = 2;
  localparam int unsigned AW = $clog2(WORDS), W = NBYTE * 9;

  logic          clk = 1'b0;
  logic          ren, wen;
  logic [AW-1:0] ra, wa;
  logic [W-1:0]  d, q;

  logic [W-1:0]  model [WORDS];
  logic [W-1:0]  last_q;
  int checks = 0, failures = 0;
  int n_rw = 0, n_collide = 0, n_ronly = 0, n_wonly = 0, n_standby = 0, n_idle = 0;
  int n_hold = 0, n_divided = 0;

  cern_sram #(.WORDS(WORDS), .NBYTE(NBYTE)) dut (.clk, .ren, .ra, .wen, .wa, .d, .q);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // Check the internal selects during one phase of the current cycle.
  task automatic check_selects(input logic active);
    checks++;
    if (active) begin
      if (!$onehot(dut.gwl) || !$onehot(dut.blk_sel) || !$onehot(dut.col_sel))
        fail($sformatf("selects not one-hot: blk=%b col=%b", dut.blk_sel, dut.col_sel));
      else n_divided++;
    end else if (dut.gwl != '0 || dut.blk_sel != '0) begin
      fail("wordline or block select active without a request");
    end
  endtask

  // One clock cycle: inputs are applied in the low phase before the edge.
  task automatic cycle(input logic r, input logic [AW-1:0] rad,
                       input logic w, input logic [AW-1:0] wad,
                       input logic [W-1:0] wd, input logic track);
    logic [W-1:0] exp;
    ren = r; ra = rad; wen = w; wa = wad; d = wd;
    exp = model[rad];
    @(posedge clk);
    #1 ren = 1'($urandom); wen = 1'($urandom);  // post-edge changes are ignored
    ra = AW'($urandom); wa = AW'($urandom); d = W'($urandom);
    #1;
    if (track) begin
      if (r) begin
        checks++;
        if (q !== exp) fail($sformatf("read %0d: q=%h exp=%h", rad, q, exp));
        last_q = exp;
      end else begin
        checks++;
        if (q !== last_q) fail("output changed without a read");
        else n_hold++;
      end
      if (r && w && rad == wad) n_collide++;
      if (r && w) n_rw++;
      if (r && !w) n_ronly++;
      if (!r && w) n_wonly++;
    end
    check_selects(r);
    @(negedge clk); #2;
    check_selects(w);
    if (track) begin
      checks++;
      if (q !== last_q) fail($sformatf("output latch did not hold: q=%h exp=%h", q, last_q));
    end
    if (w) model[wad] = wd;
    ren = 1'b0; wen = 1'b0;
  endtask

  initial begin
    ren = 1'b0; wen = 1'b0; ra = '0; wa = '0; d = '0;
    @(negedge clk);
    // Fill the memory.
    for (int a = 0; a < WORDS; a++) cycle(1'b0, '0, 1'b1, AW'(a), W'($urandom), 1'b0);
    cycle(1'b1, '0, 1'b0, '0, '0, 1'b1);
    // Random traffic with forced collisions, standby and idle cycles.
    for (int i = 0; i < 6000; i++) begin
      int unsigned kind;
      logic [AW-1:0] x;
      kind = $urandom_range(9);
      x = AW'($urandom);
      case (kind)
        0: begin  // standby: no request, inputs static
          cycle(1'b0, ra, 1'b0, wa, d, 1'b1);
          n_standby++;
        end
        1: begin  // idle: no request, inputs changing
          cycle(1'b0, AW'($urandom), 1'b0, AW'($urandom), W'($urandom), 1'b1);
          n_idle++;
        end
        2: cycle(1'b1, x, 1'b1, x, W'($urandom), 1'b1);          // same address
        3: cycle(1'b1, x, 1'b0, AW'($urandom), W'($urandom), 1'b1);
        4: cycle(1'b0, x, 1'b1, AW'($urandom), W'($urandom), 1'b1);
        default: cycle(1'b1, x, 1'b1, AW'($urandom), W'($urandom), 1'b1);
      endcase
    end
    // Read back everything.
    for (int a = 0; a < WORDS; a++) cycle(1'b1, AW'(a), 1'b0, '0, '0, 1'b1);

    $display("mechanisms: rw=%0d collide=%0d read_only=%0d write_only=%0d standby=%0d idle=%0d hold=%0d divided=%0d",
             n_rw, n_collide, n_ronly, n_wonly, n_standby, n_idle, n_hold, n_divided);
    checks++;
    if (n_rw == 0 || n_collide == 0 || n_ronly == 0 || n_wonly == 0 || n_standby == 0 ||
        n_idle == 0 || n_hold == 0 || n_divided == 0) fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
