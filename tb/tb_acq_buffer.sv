// tb_acq_buffer: checks the acquisition memory. A 16-byte instance captures
// 10 bytes, then a full buffer (length 0 means the whole memory), then
// lengths above the depth (clipped); the default 131072-byte instance
// captures 5 bytes. Bits arrive with random gaps; the consumer takes bytes
// with random stalls. The testbench packs the fed bits into bytes itself
// (first bit most significant) and checks every byte handed over, their
// count, that an offered byte is held until taken, the one-cycle done pulse
// and busy.
module tb_acq_buffer;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  int   checks = 0, failures = 0;

  logic        sa, bva, ba, tva, tra, busya, donea;
  logic [4:0]  lena;
  logic [7:0]  tda;
  logic        sb, bvb, bb, tvb, trb, busyb, doneb;
  logic [17:0] lenb;
  logic [7:0]  tdb;

  acq_buffer #(.DEPTH(16)) ba_i (.clk(clk), .rst_n(rst_n), .start_i(sa), .len_bytes_i(lena),
    .bit_valid_i(bva), .bit_i(ba), .tx_valid_o(tva), .tx_data_o(tda), .tx_ready_i(tra),
    .busy_o(busya), .done_o(donea));
  acq_buffer               bb_i (.clk(clk), .rst_n(rst_n), .start_i(sb), .len_bytes_i(lenb),
    .bit_valid_i(bvb), .bit_i(bb), .tx_valid_o(tvb), .tx_data_o(tdb), .tx_ready_i(trb),
    .busy_o(busyb), .done_o(doneb));

  task automatic capture(input int nbytes_fed, input int nbytes_exp, ref logic s, ref logic bv,
                         ref logic b, ref logic tv, ref logic [7:0] td, ref logic tr,
                         ref logic busy, ref logic done);
    logic [7:0] exp_b [$];
    logic [7:0] cur, held;
    int got, dones, holderr;
    bit was_stalled;
    @(posedge clk); #1 s = 1;
    @(posedge clk); #1 s = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL: busy not set after start"); end
    for (int i = 0; i < nbytes_fed; i++) begin
      for (int k = 0; k < 8; k++) begin
        while (($urandom % 3) == 0) begin bv = 0; @(posedge clk); #1; end
        bv = 1; b = 1'($urandom);
        cur = {cur[6:0], b};
        @(posedge clk); #1;
      end
      if (i < nbytes_exp) exp_b.push_back(cur);
      if (!busy) break;
    end
    bv = 0;
    got = 0; dones = 0; holderr = 0; was_stalled = 0;
    for (int c = 0; c < 2000 && busy; c++) begin
      tr = ($urandom % 4) != 0;
      if (was_stalled && (!tv || td !== held)) holderr++;
      was_stalled = tv && !tr;
      held = td;
      if (tv && tr) begin
        logic [7:0] e;
        e = (exp_b.size() != 0) ? exp_b.pop_front() : 8'h00;
        checks++;
        if (td !== e) begin failures++; $display("FAIL: byte %0d got %02h expected %02h", got, td, e); end
        got++;
      end
      @(posedge clk); #1;
      if (done) dones++;
    end
    tr = 0;
    checks += 3;
    if (got != nbytes_exp) begin failures++; $display("FAIL: %0d bytes sent, expected %0d", got, nbytes_exp); end
    if (dones != 1 || busy) begin failures++; $display("FAIL: done pulses %0d busy %0b", dones, busy); end
    if (holderr != 0) begin failures++; $display("FAIL: offered byte not held"); end
  endtask

  initial begin
    rst_n = 0; sa = 0; bva = 0; ba = 0; tra = 0; sb = 0; bvb = 0; bb = 0; trb = 0;
    lena = 0; lenb = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    lena = 5'd10;
    capture(10, 10, sa, bva, ba, tva, tda, tra, busya, donea);
    lena = 5'd0;
    capture(20, 16, sa, bva, ba, tva, tda, tra, busya, donea);
    lena = 5'd20;
    capture(20, 16, sa, bva, ba, tva, tda, tra, busya, donea);
    lenb = 18'd5;
    capture(5, 5, sb, bvb, bb, tvb, tdb, trb, busyb, doneb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
