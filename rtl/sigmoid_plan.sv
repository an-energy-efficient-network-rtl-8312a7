// sigmoid_plan: piecewise-linear sigmoid for the ANN hidden layer (Sec 2.3
// names a sigmoid; its circuit is this design's choice). Uses the PLAN
// approximation, only shifts and adds, with x and y in Q.12:
//   |x| >= 5         : y = 1
//   2.375 <= |x| < 5 : y = |x|/32 + 0.84375
//   1 <= |x| < 2.375 : y = |x|/8  + 0.625
//   |x| < 1          : y = |x|/4  + 0.5
//   x < 0            : y = 1 - y(|x|)
// Maximum error against the true sigmoid is about 0.019. Combinational.
module sigmoid_plan
  import noc_pkg::*;
(
  input  qval_t             x,
  output logic [ACT_W-1:0]  y
);
  logic [QV_W-1:0] ax;
  logic [QV_W-1:0] yp;

  always_comb begin
    ax = x[QV_W-1] ? QV_W'(-x) : QV_W'(x);
    if      (ax >= QV_W'(20480)) yp = QV_W'(4096);
    else if (ax >= QV_W'(9728))  yp = (ax >> 5) + QV_W'(3456);
    else if (ax >= QV_W'(4096))  yp = (ax >> 3) + QV_W'(2560);
    else                         yp = (ax >> 2) + QV_W'(2048);
    y = x[QV_W-1] ? ACT_W'(QV_W'(4096) - yp) : ACT_W'(yp);
  end
endmodule
