// tb_bist_k285: self-checking test of the K28.5 BIST.
// A repeating K28.5 stream (20 bits, bit 0 first) is fed five bits per clock
// from a random starting offset. Checks: data_en rises within 8 clocks and
// rev_data shows the pattern in canonical order; a single flipped bit drops
// data_en and adds exactly one to err_cnt; the BIST relocks afterwards and
// also after a one-bit slip of the stream; err_pwm is high for err_cnt
// clocks out of every 256.
module tb_bist_k285;
  localparam logic [19:0] PAT = 20'b1010_0000_1101_0111_1100;  // K28.5 pair
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] data;
  logic [19:0] rev_data;
  logic data_en, err_pwm;
  logic [15:0] err_cnt;
  int checks = 0, failures = 0;
  int pos;

  bist_k285 #(.LANES(5), .ERR_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // next word of the stream, optionally with bit 'flip' inverted
  task automatic send(input int flip = -1);
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      data[i] = PAT[pos % 20] ^ (i == flip);
      pos++;
    end
    @(posedge clk); #1;
  endtask

  task automatic wait_lock(input string what);
    int n = 0;
    while (!data_en && n < 8) begin send(); n++; end
    check(data_en, {what, ": no lock"});
    repeat (6) begin
      send();
      check(data_en && rev_data == PAT, {what, ": rev_data"});
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi;
    data = '0;
    pos = int'($urandom_range(0, 19));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait_lock("first");
    check(err_cnt == 0, "no errors before injection");
    send(2);
    check(!data_en && err_cnt == 1, "single bit error counted");
    wait_lock("after error");
    pos += 1;                         // bit slip
    send();
    wait_lock("after slip");
    for (int e = 0; e < 40; e++) begin send(e % 5); wait_lock("burst"); end
    hi = 0;
    repeat (256) begin @(posedge clk); #1; hi += err_pwm; end
    check(hi == int'(err_cnt), $sformatf("pwm high %0d cnt %0d", hi, err_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
