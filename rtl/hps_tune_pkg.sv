// hps_tune_pkg: per-interval corrections of the HPS coefficients.
//
// The plain interpolation constants (hps_pkg) keep the error of z within the
// limit but leave a mean error of several 1e-6, because every data path
// truncates. The tuned tables add, per interval i, a signed integer number of
// LSBs (at most 127 in size) to each of l2, j2 and -c2. The corrections were
// found by a search that simulates the bit-exact datapath for every input v
// falling in the interval. The rule: keep the maximum error of z below 2^-15
// and z(1) = 1, minimise |mean error| of the interval; among sets whose
// |mean error| is below 5e-8, take the one with the least |skewness|.
// Search ranges: 32 intervals, l2 +/-127, j2 +/-16, -c2 +/-16 LSBs; 512
// intervals, l2 +/-12, j2 +/-8, -c2 +/-64, widened to l2 +/-127 for the
// intervals still off target (mostly the last ones, where s1 is small and an
// l2 step moves z little), and for interval 0, whose l2 must stay exactly 1,
// j2 +/-100 and -c2 +/-127. The rule is that of the reference design; the
// numbers are this design's own.
package hps_tune_pkg;

  // 32 intervals
  localparam byte DL_32 [32] = '{
    0,0,0,-2,0,-3,-6,1,-5,-2,-6,-3,-3,3,-4,0,-8,-6,-5,-4,-5,-7,-4,-7,-4,-8,-7,-6,-14,-16,-30,-72
  };
  localparam byte DJ_32 [32] = '{
    -10,3,-4,1,0,8,7,-12,13,-1,11,5,5,-11,3,-10,8,5,7,5,9,16,-4,10,-6,6,-1,-7,0,4,-1,-16
  };
  localparam byte DC_32 [32] = '{
    6,-2,2,1,-1,-4,1,6,-6,2,-1,-2,-2,0,1,5,2,0,-2,-3,-4,-9,2,-5,1,-2,0,0,3,-6,3,-6
  };

  // 512 intervals
  localparam byte DL_512 [512] = '{
    0,-1,-2,1,-2,-2,0,-1,-2,2,2,-1,-1,-2,-2,-2,-1,0,0,-2,-1,0,-1,-2,-1,-2,1,-1,1,-2,-1,-1,
    -2,2,-2,-1,2,-2,0,-2,-2,2,-1,1,-2,0,-2,0,0,-2,1,-2,0,-2,0,0,-2,-2,1,-1,0,0,0,-1,
    0,-2,-2,-2,-2,0,-1,-1,0,-2,-1,-2,0,0,-2,1,-1,-1,-1,-2,-1,-2,-1,-1,0,-1,-1,-1,-3,-2,-2,-2,
    -1,-2,-1,1,1,-2,1,-1,-2,-2,-2,0,-3,-2,-1,-1,-1,-2,-1,-1,-2,-2,1,-2,-1,-2,0,-1,-2,1,-1,-2,
    -1,0,-1,-2,-3,1,0,0,-2,-3,0,0,0,-2,-2,-3,-1,1,-3,-3,1,-2,-1,-2,-3,-2,-2,-1,-3,-1,-2,0,
    0,-1,0,-2,-1,0,-2,0,1,-2,-1,-3,-3,1,-3,0,-3,-3,-1,-3,-2,-1,0,0,-3,-3,-2,-2,1,-3,-2,-2,
    -3,-2,-1,-2,-3,-2,1,-1,-1,-2,-2,-2,-1,-1,-2,1,-1,-3,-2,-1,-2,-2,0,-1,-2,0,-1,-3,-1,-2,-2,0,
    -2,0,-2,-1,-1,-3,-1,-3,-2,-2,-3,-2,0,-2,-1,-2,-3,-2,1,0,-3,-3,-2,-2,-1,-2,-1,-1,-3,1,-3,-1,
    0,-4,-1,-3,0,-3,-2,-3,-2,-1,-3,-2,-2,-2,-3,-1,-2,-2,-1,-3,-2,-3,0,-2,-2,-1,-3,-3,-1,-3,-3,-3,
    -1,-4,0,-2,0,-2,-3,-3,-1,-2,-1,-3,0,-2,-2,-3,-3,-1,-3,0,-2,-3,-3,-3,-1,-1,-2,0,-1,-4,-2,-2,
    -3,-4,-2,-4,-4,-2,-3,-1,-4,-3,-1,-2,-1,-3,-3,-3,-1,-2,-1,-3,-2,-3,-3,-3,-2,-1,-2,-4,-2,-3,-2,-4,
    -4,-3,-3,-3,-4,-4,-1,-4,-3,-3,-1,-1,-4,-4,-4,-4,-2,-3,-4,-2,-4,-2,-4,-3,-1,-2,-1,-3,-1,-4,-3,-5,
    -2,-4,-2,-2,-1,-5,-2,-6,-4,-5,-5,-4,-3,-5,-5,-5,-4,-5,-4,-6,-5,-6,-5,-4,-5,-4,-5,-5,-4,-5,-4,-2,
    -5,-4,-5,-6,-2,-4,-5,-5,-4,-2,-2,-6,-7,-4,-6,-4,-5,-6,-7,-4,-3,-6,-5,-7,-6,-7,-6,-5,-7,-6,-7,-7,
    -7,-7,-7,-8,-7,-7,-8,-8,-5,-8,-6,-9,-8,-10,-8,-9,-7,-4,-6,-10,-10,-10,-7,-10,-10,-12,-11,-9,-12,-12,-11,-13,
    -11,-10,-15,-12,-16,-17,-18,-17,-18,-17,-17,-18,-19,-21,-22,-24,-27,-23,-28,-24,-31,-33,-36,-37,-47,-62,-45,-80,-67,-127,-127,-127
  };
  localparam byte DJ_512 [512] = '{
    0,3,5,-6,6,7,-2,4,7,-8,-8,5,5,6,6,6,2,1,1,7,3,1,4,7,5,8,-4,7,-2,8,6,5,
    6,-5,8,3,-7,8,1,8,8,-6,5,-5,6,-3,5,0,-2,6,-5,7,1,8,0,-3,6,4,-5,3,-1,-1,0,5,
    -3,6,8,5,6,1,2,3,-2,7,4,8,-3,-2,5,-3,5,3,1,7,5,7,2,2,-4,2,0,0,7,6,3,5,
    0,4,1,-6,-6,5,-5,3,8,5,6,-3,8,5,0,3,1,5,3,4,7,5,-7,4,2,6,-1,4,7,-4,4,6,
    -1,-2,-2,7,5,-6,-5,-6,5,8,-1,-2,-4,3,6,6,0,-7,7,8,-6,6,3,6,8,4,5,-1,8,2,3,-3,
    -2,3,-1,4,2,-1,6,-3,-5,5,1,6,7,-8,6,-4,7,6,-1,7,1,0,-5,-5,7,6,3,5,-5,7,6,7,
    8,2,-1,5,7,4,-6,0,1,6,5,5,2,1,4,-6,1,8,4,4,6,6,-6,0,4,-7,0,7,-1,1,4,-4,
    1,-4,2,-1,-1,7,-2,6,4,2,6,3,-3,3,-2,4,6,5,-8,-3,8,5,5,2,0,3,1,-1,6,-6,7,0,
    -5,8,-5,8,-8,6,4,7,4,-1,6,0,4,3,5,0,1,0,-2,6,1,6,-4,3,4,-3,4,8,1,4,7,5,
    -4,8,-7,4,-6,4,7,8,-4,4,-3,6,-5,0,0,6,5,-4,4,-8,1,6,2,5,-1,-4,-1,-6,-4,8,-2,0,
    5,7,2,8,8,1,5,-1,8,4,-1,2,-1,4,6,5,-1,2,-2,6,2,2,4,3,-2,-7,-2,7,-3,3,-3,8,
    8,6,1,2,8,6,-3,8,4,5,-3,-7,8,6,4,8,0,4,5,-1,8,-2,6,4,-3,1,-3,2,-4,6,3,8,
    -5,5,-5,-5,-8,7,-1,8,3,5,6,6,3,4,8,4,4,8,0,8,5,8,6,4,5,3,6,8,4,6,4,-3,
    4,2,8,8,-4,2,4,4,0,-6,-8,7,7,-1,5,-2,1,6,7,-5,-8,6,1,8,6,7,5,-2,7,0,6,7,
    7,7,5,8,4,4,7,6,-3,6,-2,8,5,7,8,5,2,-8,-3,8,7,4,-4,3,0,8,2,-4,3,4,-3,6,
    -1,-6,8,-6,7,6,8,6,8,-2,7,6,4,6,5,5,6,3,6,-8,5,6,1,-1,1,7,4,4,8,-8,-8,-8
  };
  localparam byte DC_512 [512] = '{
    -127,-64,64,-64,-19,-24,-64,-31,14,-37,22,-41,20,-45,46,22,-24,56,-63,-64,55,-64,61,46,0,43,-31,-64,-26,54,-64,-18,
    10,64,-64,53,-64,-12,-39,-37,-18,-22,-64,-33,-64,-14,-6,2,45,13,-64,32,-20,-9,21,-64,-64,42,15,-64,-3,-1,-4,-64,
    -64,26,2,57,59,-64,-64,63,-64,36,-64,45,15,-64,-64,38,-64,-64,31,32,33,45,27,28,33,-64,-64,-64,-64,-64,35,50,
    37,-64,42,-64,-64,-64,46,62,48,-64,49,-64,-64,48,48,63,-64,-64,-64,-64,-64,-64,58,-64,56,-64,-64,-64,-64,63,-64,-64,
    -64,62,-64,-64,-64,-64,-64,-64,-64,-64,-64,-64,-64,-64,-64,-64,-63,-63,-62,-61,-61,-61,-60,-60,-59,-59,-58,-58,-57,-57,-56,-56,
    -55,-55,-55,-54,-54,-53,-53,-53,-52,-52,-51,-51,-51,-50,-50,-49,-49,-49,-48,-48,-48,-47,-47,-47,-46,-46,-46,-45,-45,-45,-44,-44,
    -44,-43,-43,-43,-42,-42,-42,-42,-41,-41,-41,-40,-40,-40,-40,-39,-39,-39,-39,-38,-38,-38,-38,-37,-37,-37,-37,-36,-36,-36,-36,-35,
    -35,-35,-35,-34,-34,-34,-34,-34,-33,-33,-33,-33,-32,-32,-32,-32,-32,-31,-31,-31,-31,-31,-31,-30,-30,-30,-30,-30,-29,-29,-29,-29,
    -29,-29,-28,-28,-28,-28,-28,-28,-27,-27,-27,-27,-27,-27,-26,-26,-26,-26,-26,-26,-25,-25,-25,-25,-25,-25,-25,-24,-24,-24,-24,-24,
    -24,-24,-24,-23,-23,-23,-23,-23,-23,-23,-22,-22,-22,-22,-22,-22,-22,-22,-22,-21,-21,-21,-21,-21,-21,-21,-21,-20,-20,-20,-20,-20,
    -20,-20,-20,-20,-20,-19,-19,-19,-19,-19,-19,-19,-19,-19,-19,-18,-18,-18,-18,-18,-18,-18,-18,-18,-18,-18,-17,-17,-17,-17,-17,-17,
    -17,-17,-17,-17,-17,-17,-16,-16,-16,-16,-16,-16,-16,-16,-16,-16,-16,-16,-15,-15,-15,-15,-15,-15,-15,-15,-15,-15,-15,-15,-15,-15,
    -14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-14,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,-13,
    -13,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-12,-11,-11,-11,-11,-11,-11,-11,-11,-11,-11,-11,-11,
    -11,-11,-11,-11,-11,-11,-11,-11,-11,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,-10,
    -10,-10,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-9,-8,-8
  };

  // Correction of coefficient (0: l2, 1: j2, 2: -c2) of interval i, in LSBs.
  function automatic int delta(input int unsigned intervals, input int unsigned which,
                               input int unsigned i);
    if (intervals == 512) begin
      case (which)
        0: return int'(DL_512[i]);
        1: return int'(DJ_512[i]);
        default: return int'(DC_512[i]);
      endcase
    end else begin
      case (which)
        0: return int'(DL_32[i]);
        1: return int'(DJ_32[i]);
        default: return int'(DC_32[i]);
      endcase
    end
  endfunction

endpackage
