// tb_spi_slave: checks the SPI slave against the behavioural SPI host.
//
// Several transactions of random length exchange random bytes both ways. Every byte
// the host sends must appear once on rx_valid/rx_byte, in order; the slave sends a
// queue of random bytes that the testbench presents on tx_byte (the first before CS_N
// falls, the next one after each rx_valid), and the host must read exactly those.
// start must pulse once per transaction, and rx_valid must follow the eighth rising SCK
// edge within 4 clocks. SCK runs at clk/10 here.
module tb_spi_slave;
  logic       clk = 0, rst_n = 0;
  logic       sck, cs_n, mosi, miso;
  logic       start, rx_valid;
  logic [7:0] rx_byte, tx_byte;
  int checks = 0, failures = 0;
  int starts = 0;
  int last_rise_cycle = 0, cycle = 0, nrise = 0;

  spi_slave dut (.clk(clk), .rst_n(rst_n), .sck(sck), .cs_n(cs_n), .mosi(mosi), .miso(miso),
                 .start(start), .rx_valid(rx_valid), .rx_byte(rx_byte), .tx_byte(tx_byte));
  spi_host #(.HALF(50)) host (.sck(sck), .cs_n(cs_n), .mosi(mosi), .miso(miso));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  byte unsigned sent_q [$];   // bytes the host sent, not yet seen on rx
  byte unsigned txq [$];      // bytes the slave is to send, in order

  always @(posedge clk) cycle++;
  always @(posedge sck) if (!cs_n) begin
    nrise++;
    last_rise_cycle = cycle;
  end

  // the slave side: present the next byte after each start and each received byte
  always @(negedge clk) if (rst_n) begin
    if (start) starts++;
    if (rx_valid) begin
      check(sent_q.size() > 0 && rx_byte == sent_q[0], $sformatf("rx byte %h", rx_byte));
      check(nrise % 8 == 0 && cycle - last_rise_cycle <= 4, "rx_valid follows the 8th edge");
      if (sent_q.size() > 0) void'(sent_q.pop_front());
    end
    if (rx_valid && txq.size() > 0) tx_byte <= txq.pop_front();
  end

  initial begin
    byte unsigned tx [$], rx [$], exp [$];
    tx_byte = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      int n = $urandom_range(0, 6);
      tx = {};
      exp = {};
      for (int i = 0; i <= n; i++) begin
        byte unsigned b = 8'($urandom);
        exp.push_back(b);
        txq.push_back(b);
      end
      tx_byte = txq.pop_front();   // sent while the command byte comes in
      // command byte plus n payload bytes
      sent_q.push_back(8'(t));
      for (int i = 0; i < n; i++) begin
        tx.push_back(8'($urandom));
        sent_q.push_back(tx[i]);
      end
      host.cmd(8'(t), tx, rx);
      check(rx.size() == exp.size() && rx == exp, $sformatf("transaction %0d read-back", t));
      // drop bytes queued for slots that will never come
      txq = {};
      tx_byte = 8'h00;
    end
    repeat (10) @(posedge clk);
    check(starts == 12, $sformatf("%0d start pulses, expected 12", starts));
    check(sent_q.size() == 0, "every sent byte received");
    check(miso == 1'b0, "MISO low while deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
