// SHAKE test vectors: the first 42 little-endian 64-bit words (336 bytes)
// of the output for message byte i = (7*i + 3) mod 256 of the given length,
// as defined by FIPS 202 (SHAKE-128 for EXP0/EXP3/EXP4, SHAKE-256 for
// EXP1/EXP2). Lengths: EXP0 0, EXP1 135, EXP2 300, EXP3 200, EXP4 167 bytes.
  localparam logic [63:0] EXP0 [42] = '{
    64'h7d828fe8a42b9c7f, 64'h3e85057650456061, 64'h88bceff693803bd7,
    64'h26ef66faac6e1aeb, 64'h934b0088a9eeb13c, 64'h682afdee0afb3c10,
    64'h63a3e8584afa016e, 64'he257aef9e3a1a89c, 64'h62dc233c87ccb835,
    64'h752ffa9a1660d2b8, 64'h889174d9586a91ab, 64'hb28550436a5ed235,
    64'ha559c3aadfd6dfba, 64'h38d5594bcc7bbbef, 64'hbcc8102e30049adf,
    64'hea20513a0b1abf1c, 64'h565f76adcfa7cd17, 64'hafa8cc8c364d4723,
    64'h9f844c5e9fcd0700, 64'hefbdaa140b587a16, 64'ha9fcb07cf4eee7ae,
    64'hdf1994a6fde17b76, 64'h198b3407dfe927b9, 64'h2db380b5aeab9166,
    64'h77f8238d8b5358ef, 64'hf4a04f2bb063ea32, 64'hcd281984e2603387,
    64'hc9d4c08cee4cdd60, 64'h5c6732d08861a922, 64'h15ff7a3c9350c88a,
    64'h9cb6db4a834cb933, 64'h19862d69d4ba1561, 64'h269c7b8adf0c0bf9,
    64'h3fb8705b18ac2940, 64'h590cf7b3f4f20128, 64'h1b7f3a61ebaea33e,
    64'h92f58150d73fe31d, 64'h96c0ed26452e5f30, 64'h89d864f45809b131,
    64'h7fda0f2510a01bf3, 64'hef84fc6729ec6813, 64'h70b1e068f2afe92a};
  localparam logic [63:0] EXP1 [42] = '{
    64'h9f002f3598fc1302, 64'h143936eae18edfaf, 64'h5c7ac0f6a65aa885,
    64'h9a7fb11ed26612d8, 64'h79035e4aaaa6e3f3, 64'h431ca04bdaa4e33b,
    64'hb2eb6bfc6491688b, 64'h9d56cdfe2b37eb90, 64'he5dac20b22dc692a,
    64'h401e0995399dcfd6, 64'hb7a6fa1846e8d959, 64'h3e31355d6f5e2dde,
    64'h21f42ca46e194368, 64'h4bc2fe9c124d8e26, 64'h137304b4b121d4d4,
    64'hdb69bcb80386de4a, 64'h8adec9245eb2109d, 64'h7a937b2313e7c9db,
    64'h7f2517aef9e54142, 64'he877690d24eeb0eb, 64'h99907b9031c5ba0b,
    64'he607788a9e68be28, 64'h6d52c9c0301d210a, 64'h770f3fa8f95275cb,
    64'h6a632134ac6724a9, 64'h46ba63c39fd3bd42, 64'h405c8930c62b36f5,
    64'h57a33737b069d09c, 64'ha5d891d75929115e, 64'hda505ac9fc1ec0dc,
    64'h06147eaa847f7e57, 64'h745cb6768eb90470, 64'he5648b8ca8c08936,
    64'hb5e6403e6df877a7, 64'h7740dbdd6acc03ed, 64'h4b7982a83517fe23,
    64'hf443feedf82e8e76, 64'hcf58100de3f5a358, 64'h7a5f43fb4e7035ae,
    64'he0c575828aeb4225, 64'h483ef927c0959fea, 64'hc8557b87564aceff};
  localparam logic [63:0] EXP2 [42] = '{
    64'hc7d43f2373985d68, 64'h987c947b5db14bce, 64'h4e7a8418cce5f041,
    64'hbe2230b1cc6977f0, 64'h37a0491c8b87ab75, 64'he5c8875b75146727,
    64'hb4931f72248bc953, 64'h916382d5b08f5944, 64'h1d8da7a2db3e9f79,
    64'he37349a703dfdd14, 64'had057c51ea157d2f, 64'hfdfc4d8669fc0514,
    64'h2cc90d25e8dd0e27, 64'h7daf1ad9d88b60b8, 64'h231920676f5da28f,
    64'ha3e1415b8dfce3f1, 64'ha432be061040b52d, 64'h539741421570d3f4,
    64'heed5811d5ea936ff, 64'h488939ced1625aca, 64'h5dce35db2bad7d6f,
    64'hf05f99dab1413def, 64'hebd13f215c6d77cf, 64'hb16b6c91001a90b7,
    64'h9c935f377497e88f, 64'he06ca668724b283e, 64'h7372f1c13a4ae9f4,
    64'hc7b30bb1ecdc1f69, 64'hd5cf5afa96f8c0e1, 64'h31afc4b06b5e7e35,
    64'h831a4a3e458985d1, 64'hb201343201abeca1, 64'ha4c249be709026c1,
    64'h6f4d9a3a45ac3395, 64'he05d278e38895a46, 64'h958317f9804992d2,
    64'h8750bd53790ccf84, 64'h5e9612cbf78ca40a, 64'ha3a824bf95acdee2,
    64'h76d8fc72a3863d91, 64'h4b738c0fe896d84c, 64'h79120d262eb77a63};
  localparam logic [63:0] EXP3 [42] = '{
    64'hce9dbd43e21d3a24, 64'h26b0b1757d218a31, 64'hc60f48deb5065c98,
    64'h2cfef763b6436123, 64'h558ab4c063f2e2e7, 64'hedc1fda0fb00259e,
    64'h7197a520cc2b67e9, 64'ha9c3200436ab2b14, 64'h683a7d1a16c1df8b,
    64'hc8c5805102808cb1, 64'ha60d0bcd7779350c, 64'h5c4eef123e4da056,
    64'hfaec1e73a3c6b0a8, 64'h528e58de418ef3db, 64'h4593150b1456f9b0,
    64'hfa0141b01a711aa1, 64'h26305bd925884231, 64'hd88bef53294649a9,
    64'h7273c86befe41504, 64'he6b409a2658800b9, 64'hb85e477dae0c77a3,
    64'had7cf492b29731ca, 64'h0edf09b2f98a372c, 64'h28b0234e0404b3c4,
    64'haadf2bc03fb48cb5, 64'ha0f127bf33219b8a, 64'hba3e6638529d5fff,
    64'h63af0c2822e9e02b, 64'h13d965cbea2cb2ee, 64'h6548f2171048820a,
    64'hdccde7a8dba99eb5, 64'h89f6ef337ee09c00, 64'hac2ebf624a0863b9,
    64'ha75853e8c4acbf8a, 64'hcf806dd90bde754e, 64'h1b98d3ee5bb11345,
    64'hc36b1dba6a3f8e7b, 64'hffde09d9736c8801, 64'h51ab4639a8da0e6a,
    64'hf3efb6ea60a6487d, 64'h8114d78b8c6b1198, 64'h3c6064f214eee478};
  localparam logic [63:0] EXP4 [42] = '{
    64'h37105215b01b96bb, 64'hdd60ce69af9b5f90, 64'h59a509ad6e3fa73b,
    64'hca3b75105ea8d8c8, 64'haedbb373b7968a9a, 64'hc1abc0fa62a43699,
    64'h5922f8fb5975eff2, 64'hc6e6f27857ab0b22, 64'h56dee3d847ef498d,
    64'h07e09b56114ae3a4, 64'h2ee59d5a6b11fd03, 64'h2a4253dc28504496,
    64'h8a0316c3608221f0, 64'h6f261caab485a375, 64'hceceb5e8d0070fe1,
    64'hee8e762526da96bf, 64'h35c0044fe3bbbd27, 64'h032a08a189755cb8,
    64'h21da9e67e83effde, 64'h5bc9904864b8aba8, 64'h5884fe5a9d241970,
    64'h975947dfcc0f0062, 64'h9633fb18b5b6b721, 64'haf3c0a6fb61c2413,
    64'ha132c482c0d95412, 64'hd27fa37ef0519cd6, 64'heb47fbb21d1b5def,
    64'h0cbcc34d96064f24, 64'he8bf065b398184e4, 64'hb7877faa522b3a26,
    64'hf636fffbf55d4aed, 64'h523480c554775bcc, 64'hb42813284f0f7b28,
    64'h98e9217ba5767742, 64'hfe06dfb8600e0625, 64'hc8144dc14f95a454,
    64'h792194ca33708af0, 64'h5a58680dd20c7937, 64'h50e564f2052c022b,
    64'h88d9fa04e057a8f4, 64'hea96bc5f21b2755f, 64'h4181acc7790586bd};
