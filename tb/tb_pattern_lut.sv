// tb_pattern_lut: self-checking test of the one-bit pattern table.
//
// Writes a random image into a 512-entry table, then reads both ports with
// random addresses every clock and compares each result, two clocks later,
// with a shadow copy kept by the testbench. A second write pass changes the
// image while reads continue, which checks the read-old-value rule on same-
// clock collisions. A watchdog ends the run if it hangs.
module tb_pattern_lut;
  localparam int unsigned ADDR_W = 9;
  localparam int unsigned DEPTH  = 2 ** ADDR_W;

  logic              clk = 1'b0;
  logic              we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0, ra = '0, rb = '0;
  logic              wdata = 1'b0;
  logic              da, db;

  int checks = 0, failures = 0;
  bit shadow [DEPTH];

  pattern_lut #(.ADDR_W(ADDR_W)) dut (
    .clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_a_i(ra), .raddr_b_i(rb), .rdata_a_o(da), .rdata_b_o(db)
  );

  always #5 clk = ~clk;

  // expected values, two clocks deep
  bit exp_a [2], exp_b [2];
  bit pend [2];

  task automatic step_read(input bit do_check, input bit collide = 1'b0);
    ra = collide ? waddr : ADDR_W'($urandom);
    rb = ADDR_W'($urandom);
    // value visible at this edge is the pre-write shadow
    exp_a[1] = exp_a[0]; exp_b[1] = exp_b[0]; pend[1] = pend[0];
    exp_a[0] = shadow[ra]; exp_b[0] = shadow[rb]; pend[0] = do_check;
    @(posedge clk);
    if (we) shadow[waddr] = wdata;
    #1;
    if (pend[1]) begin
      checks += 2;
      if (da !== exp_a[1]) begin failures++; $display("FAIL port a exp %0b got %0b", exp_a[1], da); end
      if (db !== exp_b[1]) begin failures++; $display("FAIL port b exp %0b got %0b", exp_b[1], db); end
    end
  endtask

  initial begin
    pend = '{0, 0};
    // first load, no checks
    for (int a = 0; a < int'(DEPTH); a++) begin
      we = 1'b1; waddr = ADDR_W'(a); wdata = 1'($urandom);
      step_read(1'b0);
    end
    we = 1'b0;
    step_read(1'b0); step_read(1'b0);
    for (int i = 0; i < 2000; i++) step_read(1'b1);
    // rewrite while reading, collisions included
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = ADDR_W'($urandom); wdata = 1'($urandom);
      if (i % 7 == 0) begin
        // same-address write and read on port a, new value differs
        we = 1'b1; wdata = ~shadow[waddr];
      end
      step_read(1'b1, i % 7 == 0);
    end
    we = 1'b0;
    for (int i = 0; i < 200; i++) step_read(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
