// tb_qsng_direction_ram: self-checking test of the direction-vector RAM: reset contents
// equal the first two Sobol dimensions (checked against literal tables), random writes
// land in the addressed vector only, and a reset restores the defaults.
module tb_qsng_direction_ram;

  localparam int NB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          we, wdim;
  logic [2:0]    widx;
  logic [NB-1:0] wdata;
  logic [NB-1:0] vec [2][NB];
  logic [NB-1:0] model [2][NB];

  qsng_direction_ram dut (.clk, .rst_n, .we, .wdim, .widx, .wdata, .vec);

  int checks = 0, failures = 0;
  localparam logic [7:0] SOBOL0 [8] = '{8'd128, 8'd64, 8'd32, 8'd16, 8'd8, 8'd4, 8'd2, 8'd1};
  localparam logic [7:0] SOBOL1 [8] = '{8'd128, 8'd192, 8'd160, 8'd240, 8'd136, 8'd204, 8'd170, 8'd255};

  task automatic compare(string what);
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < NB; k++) begin
        checks++;
        if (vec[d][k] !== model[d][k]) begin
          failures++;
          $display("FAIL: %s dim %0d V%0d = %0d expected %0d", what, d, k + 1, vec[d][k], model[d][k]);
        end
      end
  endtask

  task automatic load_defaults();
    for (int k = 0; k < NB; k++) begin model[0][k] = SOBOL0[k]; model[1][k] = SOBOL1[k]; end
  endtask

  initial begin
    we = 0; wdim = 0; widx = 0; wdata = 0;
    load_defaults();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int i = 0; i < 300; i++) begin
      we = ($urandom_range(3) != 0);
      wdim = 1'($urandom); widx = 3'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (we) model[wdim][widx] = wdata;
      compare("after write");
    end
    we = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    load_defaults();
    @(negedge clk);
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
