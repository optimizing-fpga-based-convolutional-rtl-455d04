// tb_multi_clp_scheduler: runs the schedulers of CLP 0 (Tn = 2, Tm = 56),
// CLP 1 (Tn = 56, Tm = 4) and CLP 2 (Tn = Tm = 12) over a 20 x 12 image
// with 8 x 8 tiles, answering their requests like a host and their CLP
// starts like a CLP (done after a random delay). Every tile request is
// compared with the expected sequence of layers and tiles (output-channel
// tile, tile row, tile column, input-channel tile innermost), including
// the edge-tile sizes, the kernel size, clear on the first input-channel
// tile and a store request exactly after each last input-channel tile.
module tb_multi_clp_scheduler;
  import fsrcnn_pkg::*;

  localparam int TR = 8, TC = 8, IR = 20, IC = 12;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic       start [3], busy [3], done [3], treq [3], tack [3], sreq [3], sack [3];
  logic       cstart [3], cclear [3], cdone [3];
  tile_desc_t desc [3];
  logic [2:0] ck [3];
  logic [3:0] crows [3], ccols [3];

  for (genvar g = 0; g < 3; g++) begin : g_s
    localparam int TMg = (g == 0) ? 56 : (g == 1) ? 4 : 12;
    localparam int TNg = (g == 0) ? 2 : (g == 1) ? 56 : 12;
    multi_clp_scheduler #(.CLP_ID(g), .TM(TMg), .TN(TNg), .TR(TR), .TC(TC), .KMAX(5)) dut (
      .clk, .rst_n, .start(start[g]), .img_rows(16'(IR)), .img_cols(16'(IC)),
      .busy(busy[g]), .done(done[g]), .tile_req(treq[g]), .tile_ack(tack[g]),
      .store_req(sreq[g]), .store_ack(sack[g]), .desc(desc[g]),
      .clp_start(cstart[g]), .clp_k(ck[g]), .clp_rows(crows[g]), .clp_cols(ccols[g]),
      .clp_clear(cclear[g]), .clp_done(cdone[g]));
  end

  task automatic run_clp(input int g);
    int tm, tn, ndone;
    tm = (g == 0) ? 56 : (g == 1) ? 4 : 12;
    tn = (g == 0) ? 2 : (g == 1) ? 56 : 12;
    @(negedge clk) start[g] = 1;
    @(negedge clk) start[g] = 0;
    for (int li = 0; li < clp_num_layers(g); li++) begin
      layer_t l;
      l = clp_layer(g, li);
      for (int mt = 0; mt < (int'(l.m) + tm - 1) / tm; mt++)
        for (int rt = 0; rt < (IR + TR - 1) / TR; rt++)
          for (int ct = 0; ct < (IC + TC - 1) / TC; ct++)
            for (int nt = 0; nt < (int'(l.n) + tn - 1) / tn; nt++) begin
              int rr, cc, wait_n;
              rr = (IR - rt * TR > TR) ? TR : IR - rt * TR;
              cc = (IC - ct * TC > TC) ? TC : IC - ct * TC;
              wait_n = 0;
              while (!treq[g] && wait_n < 100) begin
                chk(!sreq[g] && !cstart[g], "no other request while waiting");
                @(negedge clk);
                wait_n++;
              end
              chk(treq[g], "tile_req");
              chk(desc[g].layer == l.layer && desc[g].mt == 8'(mt) && desc[g].rt == 8'(rt) &&
                  desc[g].ct == 8'(ct) && desc[g].nt == 8'(nt) &&
                  desc[g].rows == 5'(rr) && desc[g].cols == 5'(cc),
                  $sformatf("CLP%0d desc L%0d m%0d r%0d c%0d n%0d", g, desc[g].layer, desc[g].mt, desc[g].rt, desc[g].ct, desc[g].nt));
              repeat ($urandom % 3) @(negedge clk);
              chk(treq[g], "tile_req held");
              tack[g] = 1;
              @(negedge clk) tack[g] = 0;
              while (!cstart[g]) @(negedge clk);
              chk(ck[g] == 3'(l.k) && crows[g] == 4'(rr) && ccols[g] == 4'(cc) && cclear[g] == (nt == 0),
                  $sformatf("CLP%0d command k%0d %0dx%0d clear%0d", g, ck[g], crows[g], ccols[g], cclear[g]));
              @(negedge clk);
              repeat (1 + $urandom % 5) @(negedge clk);
              cdone[g] = 1;
              @(negedge clk) cdone[g] = 0;
              if (nt == (int'(l.n) + tn - 1) / tn - 1) begin
                while (!sreq[g]) @(negedge clk);
                chk(desc[g].mt == 8'(mt) && desc[g].rt == 8'(rt) && desc[g].ct == 8'(ct), "store desc");
                sack[g] = 1;
                @(negedge clk) sack[g] = 0;
              end else begin
                @(negedge clk);
                chk(!sreq[g], "no store before the last input-channel tile");
              end
            end
    end
    ndone = 0;
    repeat (4) begin
      if (done[g]) ndone++;
      @(negedge clk);
    end
    chk(ndone == 1 && !busy[g], $sformatf("CLP%0d done once", g));
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin
      start[g] = 0; tack[g] = 0; sack[g] = 0; cdone[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_clp(0);
      run_clp(1);
      run_clp(2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
