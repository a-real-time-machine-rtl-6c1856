// tb_coef_store: checks the reset values (all zero, kernel scale -1.0), then
// writes a distinct random word to every address of the model map and reads
// every support vector and weight back through the slot port, plus bias and
// kernel scale; finally overwrites a few words and checks only those change.
module tb_coef_store;
  localparam int NS = 55, NF = 2;
  localparam int NW = NS * (NF + 1) + 2;
  logic        clk = 0, rst_n = 0, wr_en = 0;
  logic [7:0]  wr_addr = 0;
  logic [31:0] wr_data = 0;
  logic [5:0]  rd_slot = 0;
  logic [31:0] sv_out [NF];
  logic [31:0] ya_out, bias, kscale;
  logic [31:0] mem [NW];
  int checks = 0, failures = 0;

  coef_store #(.N_SV(NS), .N_FEAT(NF)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_slot(rd_slot), .sv_out(sv_out), .ya_out(ya_out), .bias(bias), .kscale(kscale));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s = %h want %h", what, got, want);
    end
  endtask

  task automatic read_all();
    for (int i = 0; i < NS; i++) begin
      rd_slot = 6'(i);
      #1;
      for (int j = 0; j < NF; j++) expect_eq("sv", sv_out[j], mem[i*NF + j]);
      expect_eq("ya", ya_out, mem[NS*NF + i]);
    end
    expect_eq("bias", bias, mem[NS*(NF+1)]);
    expect_eq("kscale", kscale, mem[NS*(NF+1) + 1]);
  endtask

  task automatic write(int addr, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = 8'(addr); wr_data = d;
    @(negedge clk);
    wr_en = 0;
    mem[addr] = d;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NW; k++) mem[k] = 0;
    mem[NW-1] = 32'hBF80_0000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    read_all();
    for (int k = 0; k < NW; k++) write(k, {$urandom} ^ 32'(k));
    read_all();
    for (int r = 0; r < 10; r++) write($urandom_range(NW - 1), $urandom);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
