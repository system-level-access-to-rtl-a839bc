// tb_ic_b: the level-i+1 chip (6 instruments) driven over SPI by a
// behavioural master. Writes instruments, reads them back (fetching return
// bytes while irq is high), checks the returned bytes and the instrument
// values, and checks that irq drops once everything is fetched.
module tb_ic_b;
  import tb_cmd_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk, cs_n, mosi, miso, irq, overflow;
  logic [111:0] inst_val;
  ic_b #(.N_INSTR(N)) dut (.clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
                           .spi_miso(miso), .spi_irq(irq), .overflow, .inst_val);
  tb_spi_master_model #(.HALF(4)) mst (.clk, .sclk, .cs_n, .mosi, .miso);

  int checks = 0, failures = 0;
  logic [31:0] model [1:N];
  byte unsigned got[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(bq_t q);
    foreach (q[i]) begin
      bit rv;
      logic [7:0] rd;
      mst.xfer(1'b1, q[i], rv, rd);
      if (rv) got.push_back(rd);
    end
  endtask

  task automatic fetch(int n);
    int t = 0;
    while (got.size() < n && t < 5000) begin
      bit rv;
      logic [7:0] rd;
      if (irq) begin
        mst.xfer(1'b0, 8'h00, rv, rd);
        if (rv) got.push_back(rd);
      end else @(posedge clk);
      t++;
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    repeat (4) begin
      bq_t q;
      int nexp = 0;
      // write all
      for (int k = 1; k <= N; k++) begin
        model[k] = $urandom() & 32'((64'd1 << blen(k)) - 1);
        add_ctrl(q, k, 1'b1);
      end
      add_data(q, 14);
      for (int k = N; k >= 1; k--)
        for (int b = 0; b < blen(k) / 8; b++) q.push_back(byte'(model[k] >> (8 * b)));
      put(q);
      repeat (300) @(posedge clk);
      for (int k = 1; k <= N; k++)
        check(32'(inst_val >> boff(k)) & 32'((64'd1 << blen(k)) - 1) == model[k] ||
              (32'(inst_val >> boff(k)) & 32'((64'd1 << blen(k)) - 1)) == model[k],
              $sformatf("instrument %0d written", k));
      // read instruments 2 and 6
      q.delete();
      got.delete();
      add_ctrl(q, 6, 1'b0);
      add_ctrl(q, 2, 1'b0);
      add_data(q, 0);
      put(q);
      fetch(6);
      check(got.size() == 6, $sformatf("six bytes returned, got %0d", got.size()));
      if (got.size() == 6) begin
        check({got[3], got[2], got[1], got[0]} == model[6], "instrument 6 read");
        check({got[5], got[4]} == model[2][15:0], "instrument 2 read");
      end
      repeat (50) @(posedge clk);
      check(!irq, "irq low when drained");
    end
    check(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
